// Fixed-point sigmoid look-up table.
//
// The input x is a signed fixed-point number with IN_BITS bits of which
// FRAC_BITS are fractional. The table holds p = round(2^OUT_BITS *
// 1/(1+exp(-x))) for every input code, saturated to 2^OUT_BITS-1, so that a
// node fires when an OUT_BITS-bit uniform random number r satisfies r < p.
// The table is computed at elaboration by a constant function (exp by
// range reduction and a Taylor series), so changing the bit lengths or the
// binary point only needs new parameters. In hardware it is a constant ROM.
//
// Timing: combinational. Interface: x (signed), p (unsigned probability).
module rbm_sigmoid_lut #(
  parameter int unsigned IN_BITS   = 8,
  parameter int unsigned FRAC_BITS = 4,
  parameter int unsigned OUT_BITS  = 8
) (
  input  logic signed [IN_BITS-1:0]  x,
  output logic        [OUT_BITS-1:0] p
);
  localparam int unsigned ENTRIES = 1 << IN_BITS;

  // exp(a) for a <= 0: exp(a) = exp(a/2^k)^(2^k) with |a/2^k| < 0.5.
  function automatic real exp_neg(input real a);
    real y, term, s;
    int  k;
    y = a;
    k = 0;
    while (y < -0.5) begin
      y = y / 2.0;
      k++;
    end
    s    = 1.0;
    term = 1.0;
    for (int n = 1; n < 16; n++) begin
      term = term * y / n;
      s    = s + term;
    end
    for (int i = 0; i < k; i++) s = s * s;
    return s;
  endfunction

  function automatic logic [OUT_BITS-1:0] entry(input int code);
    real xv, sg, scaled;
    int  q;
    xv = real'(code) / real'(1 << FRAC_BITS);
    if (xv >= 0.0) sg = 1.0 / (1.0 + exp_neg(-xv));
    else           sg = 1.0 - 1.0 / (1.0 + exp_neg(xv));
    scaled = sg * real'(1 << OUT_BITS);
    q = int'(scaled);  // rounds to nearest
    if (q > (1 << OUT_BITS) - 1) q = (1 << OUT_BITS) - 1;
    if (q < 0) q = 0;
    return OUT_BITS'(q);
  endfunction

  typedef logic [OUT_BITS-1:0] table_t [ENTRIES];

  function automatic table_t build_table();
    table_t t;
    for (int c = 0; c < int'(ENTRIES); c++) begin
      // Index c holds the entry for the two's-complement code c.
      if (c < int'(ENTRIES / 2)) t[c] = entry(c);
      else                       t[c] = entry(c - int'(ENTRIES));
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign p = TABLE[$unsigned(x)];
endmodule
