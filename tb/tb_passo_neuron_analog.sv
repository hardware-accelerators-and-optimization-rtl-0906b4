// Testbench for the passo_neuron_analog model. The output is sampled every
// 1 ns for 100 us at three input voltages: it must be almost always 0 at
// 0.1 V, about half the time 1 near 0.42 V, mostly 1 at 0.6 V, and it must
// switch at random times (many transitions at the middle voltage). With
// rstb_a low the output must stay 0.
module tb_passo_neuron_analog;
  real vin = 0.1;
  logic rstb_a = 1, vout;
  int checks = 0, failures = 0;

  passo_neuron_analog dut (.vin, .rstb_a, .vout);

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  task automatic measure(input real v, output int ones, output int flips);
    logic prev;
    vin = v;
    #200ns;
    ones = 0;
    flips = 0;
    prev = vout;
    for (int i = 0; i < 100000; i++) begin
      #1ns;
      ones += int'(vout);
      flips += int'(vout != prev);
      prev = vout;
    end
  endtask

  initial begin
    int ones, flips;
    measure(0.1, ones, flips);
    check(ones < 1000, $sformatf("0.1 V: ones %0d", ones));
    measure(0.42, ones, flips);
    check(ones > 40000 && ones < 60000, $sformatf("0.42 V: ones %0d", ones));
    check(flips > 2000, $sformatf("0.42 V: transitions %0d", flips));
    measure(0.6, ones, flips);
    check(ones > 90000, $sformatf("0.6 V: ones %0d", ones));
    rstb_a = 0;
    measure(0.6, ones, flips);
    check(ones == 0, $sformatf("reset: ones %0d", ones));
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
