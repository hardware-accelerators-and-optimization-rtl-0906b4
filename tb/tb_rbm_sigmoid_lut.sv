// Testbench for rbm_sigmoid_lut: checks all 256 input codes against
// round(256 / (1 + exp(-x/16))), saturated to 255, within one LSB, and that
// the table is monotonic.
module tb_rbm_sigmoid_lut;
  logic signed [7:0] x;
  logic [7:0] p;
  int checks = 0, failures = 0;

  rbm_sigmoid_lut #(.IN_BITS(8), .FRAC_BITS(4), .OUT_BITS(8)) dut (.x, .p);

  initial begin
    real e;
    int  ei, prev;
    prev = -1;
    for (int c = -128; c < 128; c++) begin
      x = 8'(c);
      #1;
      e  = 256.0 / (1.0 + $exp(-real'(c) / 16.0));
      ei = int'(e);
      if (ei > 255) ei = 255;
      checks++;
      if (int'(p) > ei + 1 || int'(p) < ei - 1) begin
        failures++;
        $display("FAIL: x=%0d p=%0d exp=%0d", c, p, ei);
      end
      checks++;
      if (int'(p) < prev) begin
        failures++;
        $display("FAIL: not monotonic at %0d", c);
      end
      prev = int'(p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
