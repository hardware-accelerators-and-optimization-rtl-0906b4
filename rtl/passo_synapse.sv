// Digital synapse (connection circuit) of one PASSO neuron.
//
// Each neighbour state h[k] selects its weight w[k] or zero through a 2:1
// mux (binary multiplication), the four products are added in a two-level
// tree, the neuron's bias is added, and the signed sum is turned into the
// 7-bit unsigned DAC code by offsetting it by 64 and saturating to 0..127.
// The offset-and-saturate conversion is this design's choice.
//
// Timing: purely combinational (no clock), as on the chip.
module passo_synapse
  import passo_pkg::*;
(
  input  logic [NBR-1:0]              h,
  input  logic signed [SYN_WBITS-1:0] w [NBR],
  input  logic signed [SYN_WBITS-1:0] bias,
  output logic [DAC_BITS-1:0]         dac_code
);
  localparam int unsigned SB = SYN_WBITS + 3;
  typedef logic signed [SB-1:0] sum_t;

  sum_t p [NBR];
  sum_t s01, s23, total;

  always_comb begin
    for (int k = 0; k < int'(NBR); k++) p[k] = h[k] ? sum_t'(w[k]) : sum_t'(0);
    s01   = p[0] + p[1];
    s23   = p[2] + p[3];
    total = s01 + s23 + sum_t'(bias) + sum_t'(1 << (DAC_BITS - 1));
    if (total < 0)                           dac_code = '0;
    else if (total > sum_t'((1 << DAC_BITS) - 1)) dac_code = '1;
    else                                     dac_code = total[DAC_BITS-1:0];
  end
endmodule
