// Testbench for rbm_io_ctrl (NV = 8, FIFO depth 4) with a model FIFO and a
// model core in the testbench: a run of 50 samples must enable the core
// exactly 50 times, never overfill the FIFO, stall when the host is slow,
// pass host writes through unchanged and deliver all samples in order.
module tb_rbm_io_ctrl;
  import rbm_pkg::*;
  localparam int NV = 8, FD = 4;
  logic clk = 0, rst = 1;
  logic cmd_valid = 0, cmd_ready;
  logic [15:0] cmd_addr, cmd_data;
  host_wr_t wr;
  logic run_we = 0;
  logic [15:0] run_len;
  logic core_en, sample_valid = 0;
  logic [2:0] fifo_count;
  logic fifo_empty, fifo_pop;
  logic [NV-1:0] fifo_dout;
  logic out_valid, out_ready = 0;
  logic [NV-1:0] out_data;
  logic busy, stall;
  logic [NV-1:0] q [$];
  logic [NV-1:0] seq = 0;
  int checks = 0, failures = 0, ens = 0, stalls = 0, got = 0;

  rbm_io_ctrl #(.NV(NV), .FIFO_DEPTH(FD)) dut (.*);

  always #5 clk = ~clk;

  assign fifo_count = 3'(q.size());
  assign fifo_empty = (q.size() == 0);
  assign fifo_dout  = (q.size() > 0) ? q[0] : '0;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Model core and FIFO: a sample is pushed one clock after core_en.
  always @(posedge clk) begin
    automatic logic en_now = core_en && !rst;
    automatic logic pop_now = fifo_pop;
    automatic logic stall_now = stall;
    if (pop_now) begin
      check(out_data == 8'(got), $sformatf("sample order got %0d exp %0d", out_data, got));
      got++;
      void'(q.pop_front());
    end
    if (sample_valid) begin
      if (q.size() >= FD) begin
        failures++;
        $display("FAIL: FIFO overflow");
      end else q.push_back(seq - 1'b1);
    end
    sample_valid <= en_now;
    if (en_now) begin
      ens++;
      seq <= seq + 1'b1;
    end
    if (stall_now) stalls++;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    cmd_valid = 1; cmd_addr = 16'h1234; cmd_data = 16'hBEEF;
    #1 check(wr.valid && wr.addr == 16'h1234 && wr.data == 16'hBEEF && cmd_ready, "write pass-through");
    @(posedge clk);
    #1 cmd_valid = 0; run_we = 1; run_len = 50;
    @(posedge clk);
    #1 run_we = 0;
    check(busy, "busy after run");
    for (int n = 0; n < 600 && got < 50; n++) begin
      out_ready = (n < 200) ? ($urandom % 4 == 0) : 1'b1;
      @(posedge clk);
      #1;
    end
    repeat (5) @(posedge clk);
    #1;
    check(ens == 50, $sformatf("core enabled %0d times", ens));
    check(got == 50, $sformatf("received %0d samples", got));
    check(!busy, "idle at end");
    check(stalls > 0, "stalled at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
