// Node update module: computes the next binary state of one RBM node.
//
// Each of the N states of the opposite layer masks its weight (a 2:1 mux
// that passes the weight when the state is 1 and zero otherwise). The
// surviving weights are summed in a balanced adder tree in a single cycle,
// the node's bias is added, and the sum is saturated to the sigmoid LUT's
// input range. The LUT's probability is compared with the node's own LFSR
// number; the node fires when rnd < p. Weights, bias and the LUT input share
// one fixed-point format (FRAC_BITS fractional bits).
//
// Timing: state_in to fire is combinational; the LFSR advances on every
// clock with en high, so each update sees a fresh random number.
// Interface: state_in[N], w_row[N] (signed), bias (signed), fire.
module rbm_node_update
  import rbm_pkg::*;
#(
  parameter int unsigned   N         = 32,
  parameter int unsigned   FRAC_BITS = 4,
  parameter logic [31:0]   SEED      = 32'h1234_5678
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic [N-1:0]            state_in,
  input  logic signed [WBITS-1:0] w_row [N],
  input  logic signed [WBITS-1:0] bias,
  output logic                    fire,
  output logic [PBITS-1:0]        prob    // sigmoid output, for observation
);
  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned LEAVES = 1 << LEVELS;
  localparam int unsigned ACC    = WBITS + LEVELS + 1;
  localparam int unsigned SIG_IN = 8;

  typedef logic signed [ACC-1:0] acc_t;

  acc_t tree [LEVELS+1][LEAVES];
  acc_t total;
  logic signed [SIG_IN-1:0] x;
  logic [PBITS-1:0] rnd;

  // Binary mask and adder tree.
  always_comb begin
    for (int l = 0; l <= int'(LEVELS); l++)
      for (int i = 0; i < int'(LEAVES); i++) tree[l][i] = '0;
    for (int i = 0; i < int'(N); i++)
      tree[0][i] = state_in[i] ? acc_t'(w_row[i]) : acc_t'(0);
    for (int l = 0; l < int'(LEVELS); l++)
      for (int i = 0; i < int'(LEAVES >> (l + 1)); i++)
        tree[l+1][i] = tree[l][2*i] + tree[l][2*i+1];
    total = tree[LEVELS][0] + acc_t'(bias);
  end

  // Saturate to the LUT input range.
  localparam acc_t XMAX = acc_t'((1 << (SIG_IN - 1)) - 1);
  localparam acc_t XMIN = -acc_t'(1 << (SIG_IN - 1));
  always_comb begin
    if (total > XMAX)      x = XMAX[SIG_IN-1:0];
    else if (total < XMIN) x = XMIN[SIG_IN-1:0];
    else                   x = total[SIG_IN-1:0];
  end

  rbm_sigmoid_lut #(.IN_BITS(SIG_IN), .FRAC_BITS(FRAC_BITS), .OUT_BITS(PBITS))
    u_sig (.x(x), .p(prob));

  rbm_lfsr32 #(.SEED(SEED)) u_prng (.clk(clk), .rst(rst), .en(en), .rnd(rnd));

  assign fire = (rnd < prob);
endmodule
