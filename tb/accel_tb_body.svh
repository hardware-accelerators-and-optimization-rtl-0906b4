// Signals, clocks and tasks shared by the accel_top testbenches. Included
// inside the testbench module after DEPTH is declared.

logic rbm_clk = 0, rbm_rst = 1;
logic rbm_cmd_valid = 0, rbm_cmd_ready;
logic [15:0] rbm_cmd_addr = 0, rbm_cmd_data = 0;
logic rbm_out_valid, rbm_out_ready = 0;
logic [31:0] rbm_out_data;
logic rbm_busy, rbm_stall;
logic passo_cclk = 0, passo_rstb_cfg = 0, passo_config_shift_en = 0;
logic passo_config_shift_in = 0, passo_config_shift_out;
logic passo_tclk = 0, passo_ioclk = 0, passo_rstb = 0, passo_rstb_a = 0;
logic passo_streamout_tx_valid, passo_streamout_rx_ready = 0, passo_sample_streamout;
logic passo_test_cclk = 0, passo_test_rstb_cfg = 0, passo_test_config_shift_en = 0;
logic passo_test_config_shift_in = 0, passo_test_config_shift_out;
logic [3:0] passo_test_neuron_outputs;
logic [6:0] passo_bias_trim [32];
int checks = 0, failures = 0, rbm_stalls = 0, rbm_clamped = 0;

always #5ns rbm_clk = ~rbm_clk;
always #5ns passo_cclk = ~passo_cclk;
always #5ns passo_test_cclk = ~passo_test_cclk;
always #1667ps passo_tclk = ~passo_tclk;
always #25ns passo_ioclk = ~passo_ioclk;
always @(posedge rbm_clk) if (rbm_stall) rbm_stalls++;

task automatic check(input logic ok, input string msg);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", msg);
  end
endtask

`include "passo_drive.svh"

task automatic rbm_wr(input logic [1:0] region, input int ofs, input int data);
  rbm_cmd_valid = 1;
  rbm_cmd_addr  = {region, 14'(ofs)};
  rbm_cmd_data  = 16'(data);
  @(posedge rbm_clk);
  #1ns rbm_cmd_valid = 0;
endtask

// Program the RBM (visible 0..7 clamped to pat, 16..23 bias +127, 24..31
// bias -128) and read n samples; slow: host ready one clock in three.
task automatic rbm_run(input int n, input logic [7:0] pat, input bit slow, output int cycles);
  int k, ones;
  for (int v = 0; v < 8; v++) rbm_wr(2'd3, 1 + v, {30'd0, pat[v], 1'b1});
  for (int v = 16; v < 24; v++) rbm_wr(2'd1, v, 127);
  for (int v = 24; v < 32; v++) rbm_wr(2'd1, v, -128);
  rbm_wr(2'd3, 0, n);
  k = 0; cycles = 0; ones = 0;
  while (k < n && cycles < 20 * n) begin
    rbm_out_ready = slow ? 1'($urandom % 3 == 0) : 1'b1;
    #1ns;
    if (rbm_out_valid && rbm_out_ready) begin
      check(rbm_out_data[7:0] == pat && rbm_out_data[31:24] == 8'h00,
            $sformatf("RBM sample %08h", rbm_out_data));
      ones += $countones(rbm_out_data[23:16]);
      rbm_clamped++;
      k++;
    end
    @(posedge rbm_clk);
    #1ns cycles++;
  end
  rbm_out_ready = 0;
  check(k == n, $sformatf("RBM received %0d of %0d", k, n));
  check(ones > n * 8 * 95 / 100, $sformatf("RBM biased-on bits %0d", ones));
endtask

task automatic rbm_sequence(input int n_slow, input int n_fast);
  int cyc;
  repeat (3) @(posedge rbm_clk);
  #1ns rbm_rst = 0;
  rbm_run(n_slow, 8'hA5, 1, cyc);
  rbm_run(n_fast, 8'h3C, 0, cyc);
  check(cyc <= n_fast + 4, $sformatf("RBM %0d samples took %0d clocks", n_fast, cyc));
endtask
