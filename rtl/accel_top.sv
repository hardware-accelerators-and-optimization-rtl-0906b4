// Two Ising-machine sampling accelerators side by side.
//
// rbm_*   : the synchronous FPGA Gibbs sampler for a restricted Boltzmann
//           machine (see rbm_top), one visible sample per clock.
// passo_* : the asynchronous stochastic-neuron chip (see passo_top), whose
//           256 neurons are sampled into a buffer and streamed out serially.
// The two share nothing; each keeps its own clocks, resets and ports.
module accel_top
  import rbm_pkg::*;
  import passo_pkg::*;
#(
  parameter int unsigned SRAM_DEPTH = 1024  // PASSO sample buffer words
) (
  // FPGA RBM sampler
  input  logic                 rbm_clk,
  input  logic                 rbm_rst,
  input  logic                 rbm_cmd_valid,
  output logic                 rbm_cmd_ready,
  input  logic [ADDR_BITS-1:0] rbm_cmd_addr,
  input  logic [DATA_BITS-1:0] rbm_cmd_data,
  output logic                 rbm_out_valid,
  input  logic                 rbm_out_ready,
  output logic [31:0]          rbm_out_data,
  output logic                 rbm_busy,
  output logic                 rbm_stall,
  // PASSO chip
  input  logic                 passo_cclk,
  input  logic                 passo_rstb_cfg,
  input  logic                 passo_config_shift_en,
  input  logic                 passo_config_shift_in,
  output logic                 passo_config_shift_out,
  input  logic                 passo_tclk,
  input  logic                 passo_ioclk,
  input  logic                 passo_rstb,
  input  logic                 passo_rstb_a,
  output logic                 passo_streamout_tx_valid,
  input  logic                 passo_streamout_rx_ready,
  output logic                 passo_sample_streamout,
  input  logic                 passo_test_cclk,
  input  logic                 passo_test_rstb_cfg,
  input  logic                 passo_test_config_shift_en,
  input  logic                 passo_test_config_shift_in,
  output logic                 passo_test_config_shift_out,
  output logic [3:0]           passo_test_neuron_outputs,
  output logic [BIAS_BITS-1:0] passo_bias_trim [N_BIAS]
);
  rbm_top u_rbm (
    .clk(rbm_clk), .rst(rbm_rst), .cmd_valid(rbm_cmd_valid),
    .cmd_ready(rbm_cmd_ready), .cmd_addr(rbm_cmd_addr), .cmd_data(rbm_cmd_data),
    .out_valid(rbm_out_valid), .out_ready(rbm_out_ready),
    .out_data(rbm_out_data), .busy(rbm_busy), .stall(rbm_stall));

  passo_top #(.SRAM_DEPTH(SRAM_DEPTH)) u_passo (
    .cclk(passo_cclk), .rstb_cfg(passo_rstb_cfg),
    .config_shift_en(passo_config_shift_en), .config_shift_in(passo_config_shift_in),
    .config_shift_out(passo_config_shift_out), .tclk(passo_tclk),
    .ioclk(passo_ioclk), .rstb(passo_rstb), .rstb_a(passo_rstb_a),
    .streamout_tx_valid(passo_streamout_tx_valid),
    .streamout_rx_ready(passo_streamout_rx_ready),
    .sample_streamout(passo_sample_streamout), .test_cclk(passo_test_cclk),
    .test_rstb_cfg(passo_test_rstb_cfg),
    .test_config_shift_en(passo_test_config_shift_en),
    .test_config_shift_in(passo_test_config_shift_in),
    .test_config_shift_out(passo_test_config_shift_out),
    .test_neuron_outputs(passo_test_neuron_outputs),
    .bias_trim(passo_bias_trim));
endmodule
