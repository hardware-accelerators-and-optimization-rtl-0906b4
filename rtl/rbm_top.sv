// FPGA RBM Gibbs sampling accelerator.
//
// Wires the IO controller, memory controller, parameter memory, RBM core
// and output FIFO as in the accelerator's block diagram: host writes go
// IO controller -> memory controller -> weight/bias/clamp arrays; the
// arrays are broadcast to the node update modules every clock; each new
// visible sample is pushed into the FIFO and streamed out to the host.
//
// Interface: cmd_* (programming writes, see rbm_pkg for the address map),
// out_* (NV-bit samples, valid/ready), busy (a run is in progress), stall
// (the run waits for the host to drain the FIFO).
module rbm_top
  import rbm_pkg::*;
#(
  parameter int unsigned NV         = 32,
  parameter int unsigned NH         = 32,
  parameter int unsigned FRAC_BITS  = 4,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  logic [ADDR_BITS-1:0] cmd_addr,
  input  logic [DATA_BITS-1:0] cmd_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [NV-1:0]        out_data,
  output logic                 busy,
  output logic                 stall
);
  host_wr_t wr;

  logic                    w_we, vb_we, hb_we, cl_we, run_we;
  logic [$clog2(NV)-1:0]   w_v, b_v;
  logic [$clog2(NH)-1:0]   w_h, b_h;
  logic signed [WBITS-1:0] wdata;
  logic [1:0]              cl_data;
  logic [DATA_BITS-1:0]    run_len;

  logic signed [WBITS-1:0] weight [NV][NH];
  logic signed [WBITS-1:0] vbias  [NV];
  logic signed [WBITS-1:0] hbias  [NH];
  logic [NV-1:0]           clamp_en, clamp_val;

  logic                        core_en, sample_valid;
  logic [NV-1:0]               v_state;
  logic [NH-1:0]               h_state;
  logic                        fifo_pop, fifo_full, fifo_empty;
  logic [NV-1:0]               fifo_dout;
  logic [$clog2(FIFO_DEPTH):0] fifo_count;

  rbm_io_ctrl #(.NV(NV), .FIFO_DEPTH(FIFO_DEPTH)) u_io (
    .clk, .rst, .cmd_valid, .cmd_ready, .cmd_addr, .cmd_data, .wr,
    .run_we, .run_len, .core_en, .sample_valid, .fifo_count, .fifo_empty,
    .fifo_dout, .fifo_pop, .out_valid, .out_ready, .out_data, .busy, .stall);

  rbm_mem_ctrl #(.NV(NV), .NH(NH)) u_mc (
    .wr, .w_we, .w_v, .w_h, .vb_we, .hb_we, .cl_we, .b_v, .b_h, .wdata,
    .cl_data, .run_we, .run_len);

  rbm_param_mem #(.NV(NV), .NH(NH)) u_mem (
    .clk, .rst, .w_we, .w_v, .w_h, .vb_we, .hb_we, .cl_we, .b_v, .b_h,
    .wdata, .cl_data, .weight, .vbias, .hbias, .clamp_en, .clamp_val);

  rbm_core #(.NV(NV), .NH(NH), .FRAC_BITS(FRAC_BITS)) u_core (
    .clk, .rst, .en(core_en), .weight, .vbias, .hbias, .clamp_en,
    .clamp_val, .v_state, .h_state, .sample_valid);

  rbm_sample_fifo #(.WIDTH(NV), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .push(sample_valid), .din(v_state), .pop(fifo_pop),
    .dout(fifo_dout), .full(fifo_full), .empty(fifo_empty),
    .count(fifo_count));
endmodule
