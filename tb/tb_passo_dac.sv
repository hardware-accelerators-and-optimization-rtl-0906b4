// Testbench for the passo_dac model: every code gives 0.8 V * code / 127
// after the conversion delay, and the output does not move before it.
module tb_passo_dac;
  logic [6:0] code = 0;
  real vout;
  int checks = 0, failures = 0;

  passo_dac dut (.code, .vout);

  initial begin
    real e, prev_v;
    #1ns;
    for (int c = 0; c < 128; c++) begin
      prev_v = vout;
      code = 7'(c);
      #50ps;
      checks++;
      if (c > 0 && vout != prev_v) begin
        failures++;
        $display("FAIL: output moved prev_v the delay at code %0d", c);
      end
      #1ns;
      e = 0.8 * real'(c) / 127.0;
      checks++;
      if (vout < e - 1e-9 || vout > e + 1e-9) begin
        failures++;
        $display("FAIL: code %0d vout %f exp %f", c, vout, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
