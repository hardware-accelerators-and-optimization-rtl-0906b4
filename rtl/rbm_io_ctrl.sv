// IO controller of the RBM sampler.
//
// Host side: a write command port (valid/ready, always ready) carrying the
// memory-mapped writes that program weights, biases and clamps, and a
// sample stream (valid/ready) that delivers one NV-bit visible sample per
// word out of the sample FIFO. The stream stands for the link to the host
// (a PCIe core in an FPGA build).
// Run control: writing N to control offset 0 asks for N samples. The core is
// enabled while samples remain and the FIFO has room for the sample in
// flight; when the host drains the stream slower than one word per clock
// the core stalls instead of dropping samples.
//
// Timing: core_en is combinational from registered state and the FIFO
// count; one sample leaves the core one clock after each core_en.
module rbm_io_ctrl
  import rbm_pkg::*;
#(
  parameter int unsigned NV         = 32,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                        clk,
  input  logic                        rst,
  // host commands
  input  logic                        cmd_valid,
  output logic                        cmd_ready,
  input  logic [ADDR_BITS-1:0]        cmd_addr,
  input  logic [DATA_BITS-1:0]        cmd_data,
  output host_wr_t                    wr,
  // run control (from the memory controller's decode)
  input  logic                        run_we,
  input  logic [DATA_BITS-1:0]        run_len,
  // core and FIFO
  output logic                        core_en,
  input  logic                        sample_valid,
  input  logic [$clog2(FIFO_DEPTH):0] fifo_count,
  input  logic                        fifo_empty,
  input  logic [NV-1:0]               fifo_dout,
  output logic                        fifo_pop,
  // host sample stream
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [NV-1:0]               out_data,
  output logic                        busy,
  output logic                        stall
);
  logic [DATA_BITS-1:0] remaining;
  logic                 room;

  assign cmd_ready = 1'b1;
  assign wr        = '{valid: cmd_valid, addr: cmd_addr, data: cmd_data};

  assign room    = (32'(fifo_count) + 32'(sample_valid)) < FIFO_DEPTH;
  assign busy    = (remaining != '0);
  assign core_en = busy && room;
  assign stall   = busy && !room;

  always_ff @(posedge clk) begin
    if (rst)          remaining <= '0;
    else if (run_we)  remaining <= run_len;
    else if (core_en) remaining <= remaining - 1'b1;
  end

  assign out_valid = !fifo_empty;
  assign out_data  = fifo_dout;
  assign fifo_pop  = out_valid && out_ready;

  a_stream_hold: assert property (@(posedge clk) disable iff (rst)
    out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule
