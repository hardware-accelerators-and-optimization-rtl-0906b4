// Testbench for one passo_neuron tile: the DAC code must follow the
// configured weights, bias and neighbour states (reference computed here
// from the 74-bit configuration layout), and the output must be mostly 0
// at code 0 and mostly 1 at code 127.
module tb_passo_neuron;
  logic rstb_a = 1;
  logic [73:0] cfg;
  logic [3:0] h;
  logic [6:0] dac_code;
  logic out;
  int checks = 0, failures = 0;

  passo_neuron dut (.*);

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic logic [73:0] make_cfg(input int w0, w1, w2, w3, b);
    logic [73:0] c;
    c = {34'h2_DEAD_BEEF, 8'(b), 8'(w3), 8'(w2), 8'(w1), 8'(w0)};
    return c;
  endfunction

  function automatic int ref_code(input logic [73:0] c, input logic [3:0] hh);
    int s;
    s = int'($signed(c[39:32])) + 64;
    for (int k = 0; k < 4; k++) if (hh[k]) s += int'($signed(c[8*k +: 8]));
    return (s < 0) ? 0 : (s > 127) ? 127 : s;
  endfunction

  task automatic ones_over(input int n, output int ones);
    ones = 0;
    #100ns;
    for (int i = 0; i < n; i++) begin
      #1ns;
      ones += int'(out);
    end
  endtask

  initial begin
    int ones;
    for (int n = 0; n < 2000; n++) begin
      cfg = make_cfg($urandom % 64 - 32, $urandom % 64 - 32, $urandom % 64 - 32,
                     $urandom % 64 - 32, $urandom % 64 - 32);
      h = 4'($urandom);
      #1ns;
      check(int'(dac_code) == ref_code(cfg, h), $sformatf("code %0d exp %0d", dac_code, ref_code(cfg, h)));
    end
    cfg = make_cfg(0, 0, 127, 0, -128);
    h = 4'b0000;
    ones_over(20000, ones);
    check(dac_code == 0 && ones < 200, $sformatf("code 0: ones %0d", ones));
    h = 4'b0100;
    ones_over(20000, ones);
    check(dac_code == 63 && ones > 4000 && ones < 16000, $sformatf("code 63: ones %0d", ones));
    cfg = make_cfg(0, 0, 127, 0, 0);
    ones_over(20000, ones);
    check(dac_code == 127 && ones > 19000, $sformatf("code 127: ones %0d", ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
