// One PASSO neuron tile (behavioural: contains the analog neuron and DAC
// models).
//
// The tile's 74 configuration bits hold four signed 8-bit weights (bits
// [31:0], weight k in [8k+7:8k]), a signed 8-bit bias ([39:32]) and 34
// analog settings ([73:40]) that this model keeps but does not interpret.
// The digital synapse turns the four neighbour states into a DAC code, the
// DAC into the neuron's input voltage, and the analog neuron into a random
// binary output whose probability of being 1 rises with that voltage.
//
// Timing: asynchronous; out changes at random instants.
module passo_neuron
  import passo_pkg::*;
(
  input  logic                  rstb_a,
  input  logic [NEURON_CFG-1:0] cfg,
  input  logic [NBR-1:0]        h,
  output logic [DAC_BITS-1:0]   dac_code,
  output logic                  out
);
  logic signed [SYN_WBITS-1:0] w [NBR];
  logic signed [SYN_WBITS-1:0] bias;
  real                         vin;

  always_comb begin
    for (int k = 0; k < int'(NBR); k++) w[k] = cfg[w_lsb(k) +: SYN_WBITS];
    bias = cfg[BIAS_LSB +: SYN_WBITS];
  end

  passo_synapse u_syn (.h(h), .w(w), .bias(bias), .dac_code(dac_code));

  passo_dac #(.BITS(DAC_BITS)) u_dac (.code(dac_code), .vout(vin));

  passo_neuron_analog u_an (.vin(vin), .rstb_a(rstb_a), .vout(out));
endmodule
