// Testbench for passo_synapse: 20000 random neighbour states, weights and
// biases against the reference code = clamp(bias + sum of selected
// weights + 64, 0, 127), with extra cases near the saturation limits.
module tb_passo_synapse;
  logic [3:0] h;
  logic signed [7:0] w [4];
  logic signed [7:0] bias;
  logic [6:0] dac_code;
  int checks = 0, failures = 0;

  passo_synapse dut (.*);

  initial begin
    int s, e;
    for (int n = 0; n < 20000; n++) begin
      h = 4'($urandom);
      for (int k = 0; k < 4; k++) w[k] = (n % 2) ? 8'($urandom % 40) - 8'sd20 : 8'($urandom);
      bias = (n % 2) ? 8'($urandom % 40) - 8'sd20 : 8'($urandom);
      #1;
      s = int'(bias) + 64;
      for (int k = 0; k < 4; k++) if (h[k]) s += int'(w[k]);
      e = (s < 0) ? 0 : (s > 127) ? 127 : s;
      checks++;
      if (int'(dac_code) != e) begin
        failures++;
        $display("FAIL: h=%b sum=%0d code=%0d exp=%0d", h, s, dac_code, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
