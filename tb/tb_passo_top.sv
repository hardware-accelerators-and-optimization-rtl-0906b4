// End-to-end testbench of the PASSO chip model with a 64-word sample
// buffer. It shifts the full 19171-bit configuration in (checking the chain
// length with a marker), configures the test cluster, releases the resets
// and receives four bursts from the serial streamout:
//  1. preset 4 (all 256 neurons), host ready at random (backpressure);
//  2. preset 4, host always ready: one word per 16 IO clocks;
//  3. half received, then the whole chain is reloaded with preset 0 while
//     the stream is paused, then the rest received (not compared);
//  4. preset 0 (neurons 0..15 only in every word), compared.
// Compared bits must match the configured on/off pattern in 98% of cases
// (the stochastic neurons rarely flip even at the extreme biases).
module tb_passo_top;
  localparam int DEPTH = 64;
  logic passo_cclk = 0, passo_rstb_cfg = 0, passo_config_shift_en = 0;
  logic passo_config_shift_in = 0, passo_config_shift_out;
  logic passo_tclk = 0, passo_ioclk = 0, passo_rstb = 0, passo_rstb_a = 0;
  logic passo_streamout_tx_valid, passo_streamout_rx_ready = 0, passo_sample_streamout;
  logic passo_test_cclk = 0, passo_test_rstb_cfg = 0, passo_test_config_shift_en = 0;
  logic passo_test_config_shift_in = 0, passo_test_config_shift_out;
  logic [3:0] passo_test_neuron_outputs;
  logic [6:0] passo_bias_trim [32];
  int checks = 0, failures = 0;

  passo_top #(.SRAM_DEPTH(DEPTH)) dut (
    .cclk(passo_cclk), .rstb_cfg(passo_rstb_cfg), .config_shift_en(passo_config_shift_en),
    .config_shift_in(passo_config_shift_in), .config_shift_out(passo_config_shift_out),
    .tclk(passo_tclk), .ioclk(passo_ioclk), .rstb(passo_rstb), .rstb_a(passo_rstb_a),
    .streamout_tx_valid(passo_streamout_tx_valid), .streamout_rx_ready(passo_streamout_rx_ready),
    .sample_streamout(passo_sample_streamout), .test_cclk(passo_test_cclk),
    .test_rstb_cfg(passo_test_rstb_cfg), .test_config_shift_en(passo_test_config_shift_en),
    .test_config_shift_in(passo_test_config_shift_in),
    .test_config_shift_out(passo_test_config_shift_out),
    .test_neuron_outputs(passo_test_neuron_outputs), .bias_trim(passo_bias_trim));

  always #5ns passo_cclk = ~passo_cclk;
  always #5ns passo_test_cclk = ~passo_test_cclk;
  always #1667ps passo_tclk = ~passo_tclk;
  always #25ns passo_ioclk = ~passo_ioclk;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  `include "passo_drive.svh"

  initial begin
    int good, total;
    #100ns passo_rstb_cfg = 1;
    passo_test_rstb_cfg = 1;
    load_config(4);
    load_test_cluster();
    passo_rstb_a = 1;
    #500ns passo_rstb = 1;
    check_test_cluster();
    receive(DEPTH, 1, 4, 1, good, total);
    check(good * 100 > total * 98, $sformatf("burst 1: %0d of %0d bits", good, total));
    bursts_checked++;
    receive(DEPTH, 1, 4, 0, good, total);
    check(good * 100 > total * 98, $sformatf("burst 2: %0d of %0d bits", good, total));
    bursts_checked++;
    receive(DEPTH / 2, 0, 4, 1, good, total);
    load_config(0);
    preset_switches++;
    receive(DEPTH / 2, 0, 4, 0, good, total);
    receive(DEPTH, 1, 0, 0, good, total);
    check(good * 100 > total * 98, $sformatf("burst 4 (preset 0): %0d of %0d bits", good, total));
    bursts_checked++;
    check(stall_cycles > 0, $sformatf("backpressure stalls: %0d", stall_cycles));
    check(bursts_checked == 3 && preset_switches == 1, "bursts and preset switch happened");
    $display("mechanisms: stalls=%0d bursts_checked=%0d preset_switches=%0d",
             stall_cycles, bursts_checked, preset_switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
