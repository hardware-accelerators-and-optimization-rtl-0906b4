// PASSO chip model: a parallel asynchronous stochastic sampling optimizer.
//
// 256 stochastic neurons on a 16x16 grid run continuously and without a
// clock; each neuron's digital synapse feeds its neighbours' states and its
// weights to a DAC that biases the analog neuron. A separate 2x2 test
// cluster has its own configuration chain and brings its four outputs out
// directly. The main chain (19171 bits, shifted in on cclk) holds, from bit
// 0 up: 256 x 74 neuron bits (neuron i at i*74), 32 x 7 bias-trim bits,
// then the 3-bit sampling preset. The sampler takes the neuron outputs on
// the sampling clock tclk at the preset's rate and fills the SRAM buffer in
// a burst; the streamout side then reads it on the IO clock ioclk and
// sends it serially with a valid/ready handshake, after which the next
// burst starts. The bias trims drive analog current references that are not
// modelled; their codes are brought out on bias_trim.
//
// Port names follow the chip's bump map. Resets are active low: rstb_cfg
// and test_rstb_cfg clear the chains, rstb the sampling and streamout
// logic, rstb_a holds the analog neurons at 0.
module passo_top
  import passo_pkg::*;
#(
  parameter int unsigned SRAM_DEPTH = 1024
) (
  // configuration chain
  input  logic                 cclk,
  input  logic                 rstb_cfg,
  input  logic                 config_shift_en,
  input  logic                 config_shift_in,
  output logic                 config_shift_out,
  // sampling and streamout
  input  logic                 tclk,
  input  logic                 ioclk,
  input  logic                 rstb,
  input  logic                 rstb_a,
  output logic                 streamout_tx_valid,
  input  logic                 streamout_rx_ready,
  output logic                 sample_streamout,
  // test cluster
  input  logic                 test_cclk,
  input  logic                 test_rstb_cfg,
  input  logic                 test_config_shift_en,
  input  logic                 test_config_shift_in,
  output logic                 test_config_shift_out,
  output logic [3:0]           test_neuron_outputs,
  // to the analog bias generators
  output logic [BIAS_BITS-1:0] bias_trim [N_BIAS]
);
  localparam int unsigned CHAIN    = chain_len(NEURONS);   // 19171
  localparam int unsigned NCFG     = NEURONS * NEURON_CFG;
  localparam int unsigned TEST_LEN = 4 * NEURON_CFG;
  localparam int unsigned AW       = $clog2(SRAM_DEPTH);

  logic [CHAIN-1:0]    cfg;
  logic [TEST_LEN-1:0] test_cfg;
  logic [NEURONS-1:0]  neuron_out;
  logic [DAC_BITS-1:0] dac_code [NEURONS];
  logic [DAC_BITS-1:0] test_dac [4];
  logic [SAMPLE_CFG-1:0] preset;

  logic            wen, full_tgl, drained_tgl, sample_tick, bursting, word_done;
  logic [AW-1:0]   waddr, raddr;
  logic [WORD-1:0] wdata, rdata;

  passo_cfg_chain #(.LEN(CHAIN)) u_chain (
    .cclk(cclk), .rstb_cfg(rstb_cfg), .shift_en(config_shift_en),
    .shift_in(config_shift_in), .shift_out(config_shift_out), .cfg(cfg));

  always_comb
    for (int j = 0; j < int'(N_BIAS); j++)
      bias_trim[j] = cfg[NCFG + j*BIAS_BITS +: BIAS_BITS];
  assign preset = cfg[NCFG + N_BIAS*BIAS_BITS +: SAMPLE_CFG];

  passo_fabric #(.R(ROWS), .C(COLS)) u_core (
    .rstb_a(rstb_a), .cfg(cfg[NCFG-1:0]), .out(neuron_out), .dac_code(dac_code));

  passo_cfg_chain #(.LEN(TEST_LEN)) u_test_chain (
    .cclk(test_cclk), .rstb_cfg(test_rstb_cfg), .shift_en(test_config_shift_en),
    .shift_in(test_config_shift_in), .shift_out(test_config_shift_out),
    .cfg(test_cfg));

  passo_fabric #(.R(2), .C(2)) u_test (
    .rstb_a(rstb_a), .cfg(test_cfg), .out(test_neuron_outputs), .dac_code(test_dac));

  passo_sampler #(.N(NEURONS), .DEPTH(SRAM_DEPTH)) u_smp (
    .tclk(tclk), .rstb(rstb), .neuron_async(neuron_out), .preset(preset),
    .drained_tgl(drained_tgl), .wen(wen), .waddr(waddr), .wdata(wdata),
    .full_tgl(full_tgl), .sample_tick(sample_tick), .bursting(bursting));

  passo_sram_buffer #(.WIDTH(WORD), .DEPTH(SRAM_DEPTH)) u_sram (
    .wclk(tclk), .wen(wen), .waddr(waddr), .wdata(wdata),
    .rclk(ioclk), .raddr(raddr), .rdata(rdata));

  passo_streamout #(.DEPTH(SRAM_DEPTH)) u_so (
    .ioclk(ioclk), .rstb(rstb), .full_tgl(full_tgl), .drained_tgl(drained_tgl),
    .raddr(raddr), .rdata(rdata), .streamout_tx_valid(streamout_tx_valid),
    .streamout_rx_ready(streamout_rx_ready), .sample_streamout(sample_streamout),
    .word_done(word_done));
endmodule
