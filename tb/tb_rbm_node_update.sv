// Testbench for rbm_node_update with N = 8: random weight rows, biases and
// input states. The probability must match the sigmoid of the saturated
// masked sum within one LSB, and fire must equal (r < p) for the random
// number r of a reference copy of the LFSR with the same seed.
module tb_rbm_node_update;
  localparam int N = 8;
  localparam logic [31:0] SEED = 32'h0BAD_F00D;
  logic clk = 0, rst = 1, en = 0;
  logic [N-1:0] state_in;
  logic signed [7:0] w_row [N];
  logic signed [7:0] bias;
  logic fire;
  logic [7:0] prob;
  int checks = 0, failures = 0;

  rbm_node_update #(.N(N), .FRAC_BITS(4), .SEED(SEED)) dut (
    .clk, .rst, .en, .state_in, .w_row, .bias, .fire, .prob);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    logic [31:0] ref_s;
    int  sum, xs, ei;
    real e;
    ref_s = SEED;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int n = 0; n < 3000; n++) begin
      state_in = N'($urandom);
      bias     = 8'($urandom);
      for (int i = 0; i < N; i++) w_row[i] = (n % 3 == 0) ? 8'($urandom % 32) : 8'($urandom);
      #1;
      sum = int'(bias);
      for (int i = 0; i < N; i++) if (state_in[i]) sum += int'(w_row[i]);
      xs = (sum > 127) ? 127 : (sum < -128) ? -128 : sum;
      e  = 256.0 / (1.0 + $exp(-real'(xs) / 16.0));
      ei = int'(e);
      if (ei > 255) ei = 255;
      check(int'(prob) <= ei + 1 && int'(prob) >= ei - 1,
            $sformatf("prob %0d exp %0d (sum %0d)", prob, ei, sum));
      check(fire == (ref_s[7:0] < prob), $sformatf("fire %0b rnd %0d prob %0d", fire, ref_s[7:0], prob));
      en = 1;
      @(posedge clk);
      #1 en = 0;
      for (int i = 0; i < 8; i++) ref_s = {ref_s[30:0], ref_s[31] ^ ref_s[21] ^ ref_s[1] ^ ref_s[0]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
