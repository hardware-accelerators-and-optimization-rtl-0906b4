// Testbench for rbm_lfsr32: compares 2000 outputs with a bit-serial
// reference of the same polynomial (taps 32, 22, 2, 1, eight steps per
// clock), checks that enable low holds the output, and that a zero seed
// does not lock the register.
module tb_rbm_lfsr32;
  logic clk = 0, rst = 1, en = 0;
  logic [7:0] rnd, rnd0;
  int checks = 0, failures = 0;

  rbm_lfsr32 #(.SEED(32'hDEAD_BEEF)) dut (.clk, .rst, .en, .rnd);
  rbm_lfsr32 #(.SEED(32'h0)) dut0 (.clk, .rst, .en, .rnd(rnd0));

  always #5 clk = ~clk;

  function automatic logic [31:0] step(input logic [31:0] s);
    logic fb;
    fb = s[31] ^ s[21] ^ s[1] ^ s[0];
    return {s[30:0], fb};
  endfunction

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    logic [31:0] ref_s;
    logic [7:0]  held;
    int          zeros;
    ref_s = 32'hDEAD_BEEF;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    check(rnd == ref_s[7:0], "seed value");
    en = 1;
    zeros = 0;
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk);
      #1;
      for (int i = 0; i < 8; i++) ref_s = step(ref_s);
      check(rnd == ref_s[7:0], $sformatf("sample %0d got %02h exp %02h", n, rnd, ref_s[7:0]));
      if (rnd0 == 0) zeros++;
    end
    check(zeros < 100, "zero seed replaced by a working seed");
    en = 0;
    held = rnd;
    repeat (5) @(posedge clk);
    #1 check(rnd == held, "hold while en low");
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
