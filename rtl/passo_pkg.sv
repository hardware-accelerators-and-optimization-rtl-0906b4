// Shared constants of the PASSO stochastic-neuron chip model.
//
// Sizes follow the chip: a 16x16 fabric of 256 neurons with 74
// configuration bits each, 32 trimmable bias currents of 7 bits, and a
// 3-bit sampling preset, chained into one 19171-bit configuration shift
// register. The split of a neuron's 74 bits (four 8-bit weights, an 8-bit
// bias, 34 analog settings) and the word size of the sample buffer are this
// model's choices.
package passo_pkg;
  localparam int unsigned ROWS        = 16;
  localparam int unsigned COLS        = 16;
  localparam int unsigned NEURONS     = ROWS * COLS;  // 256
  localparam int unsigned NBR         = 4;            // synapse inputs
  localparam int unsigned NEURON_CFG  = 74;
  localparam int unsigned SYN_WBITS   = 8;            // weight and bias width
  localparam int unsigned DAC_BITS    = 7;
  localparam int unsigned N_BIAS      = 32;
  localparam int unsigned BIAS_BITS   = 7;
  localparam int unsigned SAMPLE_CFG  = 3;
  localparam int unsigned WORD        = 16;           // sample word / SRAM width
  localparam int unsigned MAX_PRESET  = 4;            // 16 << 4 = 256 neurons

  // Chain length for a fabric of n neurons.
  function automatic int unsigned chain_len(input int unsigned n);
    return n * NEURON_CFG + N_BIAS * BIAS_BITS + SAMPLE_CFG;
  endfunction

  // Field positions inside one neuron's configuration word.
  function automatic int unsigned w_lsb(input int unsigned k);
    return k * SYN_WBITS;
  endfunction
  localparam int unsigned BIAS_LSB = NBR * SYN_WBITS;            // 32
  localparam int unsigned AUX_LSB  = BIAS_LSB + SYN_WBITS;       // 40
  localparam int unsigned AUX_BITS = NEURON_CFG - AUX_LSB;       // 34
endpackage
