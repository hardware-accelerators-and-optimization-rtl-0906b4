// Testbench for rbm_sample_fifo (depth 8): random pushes and pops, never
// past full or empty, against a queue reference; checks data order, count,
// full and empty.
module tb_rbm_sample_fifo;
  localparam int W = 32, D = 8;
  logic clk = 0, rst = 1, push = 0, pop = 0;
  logic [W-1:0] din, dout;
  logic full, empty;
  logic [3:0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, fulls = 0;

  rbm_sample_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      check(count == 4'(q.size()), $sformatf("count %0d exp %0d", count, q.size()));
      check(full == (q.size() == D) && empty == (q.size() == 0), "flags");
      if (q.size() > 0) check(dout == q[0], "head data");
      if (full) fulls++;
      push = !full && ($urandom % 100 < ((n / 500) % 2 ? 30 : 70));
      pop  = !empty && ($urandom % 100 < ((n / 500) % 2 ? 70 : 30));
      din  = $urandom;
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
      #1;
    end
    check(fulls > 0, "full reached");
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
