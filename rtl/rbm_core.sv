// RBM computing core: node registers and one node update module per node.
//
// Gibbs sampling of a restricted Boltzmann machine with NV visible and NH
// hidden binary nodes. Every enabled clock both layers are updated at once,
// each from the other layer's current registers: h <= sample(W^T v + b_h)
// and v <= sample(W h + b_v). With a node update module per node there is
// no pipeline and no hazard, so a new visible sample appears every clock.
// Updating both layers in the same clock (rather than alternating) is this
// design's reading of "a new sample every clock cycle"; it runs two
// interleaved Gibbs chains. A clamped visible node keeps its clamp value.
//
// Timing: v_state/h_state are registers; sample_valid is high for one clock
// after each enabled update, together with the new v_state.
module rbm_core
  import rbm_pkg::*;
#(
  parameter int unsigned NV        = 32,
  parameter int unsigned NH        = 32,
  parameter int unsigned FRAC_BITS = 4
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    en,
  input  logic signed [WBITS-1:0] weight [NV][NH],
  input  logic signed [WBITS-1:0] vbias  [NV],
  input  logic signed [WBITS-1:0] hbias  [NH],
  input  logic [NV-1:0]           clamp_en,
  input  logic [NV-1:0]           clamp_val,
  output logic [NV-1:0]           v_state,
  output logic [NH-1:0]           h_state,
  output logic                    sample_valid
);
  logic [NV-1:0] v_fire;
  logic [NH-1:0] h_fire;

  for (genvar v = 0; v < int'(NV); v++) begin : g_vis
    logic signed [WBITS-1:0] row [NH];
    always_comb for (int h = 0; h < int'(NH); h++) row[h] = weight[v][h];
    rbm_node_update #(.N(NH), .FRAC_BITS(FRAC_BITS),
                      .SEED(32'h9E37_79B9 * (v + 1) + 32'h1))
      u_nu (.clk(clk), .rst(rst), .en(en), .state_in(h_state), .w_row(row),
            .bias(vbias[v]), .fire(v_fire[v]), .prob());
  end

  for (genvar h = 0; h < int'(NH); h++) begin : g_hid
    logic signed [WBITS-1:0] col [NV];
    always_comb for (int v = 0; v < int'(NV); v++) col[v] = weight[v][h];
    rbm_node_update #(.N(NV), .FRAC_BITS(FRAC_BITS),
                      .SEED(32'h7F4A_7C15 * (h + 1) + 32'h3))
      u_nu (.clk(clk), .rst(rst), .en(en), .state_in(v_state), .w_row(col),
            .bias(hbias[h]), .fire(h_fire[h]), .prob());
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v_state      <= '0;
      h_state      <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= en;
      if (en) begin
        h_state <= h_fire;
        v_state <= (clamp_en & clamp_val) | (~clamp_en & v_fire);
      end
    end
  end
endmodule
