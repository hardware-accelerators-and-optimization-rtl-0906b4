// Parameter memory of the RBM: weight array, visible and hidden bias arrays
// and visible-node clamps.
//
// All entries are registers so that every node update module can read its
// whole weight row (or column) in the same cycle: visible node v reads
// W[v][*], hidden node h reads W[*][h]. One write port, driven by the
// memory controller, writes one entry per clock. Reset clears everything.
//
// Timing: writes land on the clock edge; reads are combinational.
module rbm_param_mem
  import rbm_pkg::*;
#(
  parameter int unsigned NV = 32,
  parameter int unsigned NH = 32
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     w_we,
  input  logic [$clog2(NV)-1:0]    w_v,
  input  logic [$clog2(NH)-1:0]    w_h,
  input  logic                     vb_we,
  input  logic                     hb_we,
  input  logic                     cl_we,
  input  logic [$clog2(NV)-1:0]    b_v,     // visible index for bias / clamp
  input  logic [$clog2(NH)-1:0]    b_h,     // hidden index for bias
  input  logic signed [WBITS-1:0]  wdata,
  input  logic [1:0]               cl_data, // {clamp value, clamp enable}
  output logic signed [WBITS-1:0]  weight [NV][NH],
  output logic signed [WBITS-1:0]  vbias  [NV],
  output logic signed [WBITS-1:0]  hbias  [NH],
  output logic [NV-1:0]            clamp_en,
  output logic [NV-1:0]            clamp_val
);
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int v = 0; v < int'(NV); v++)
        for (int h = 0; h < int'(NH); h++) weight[v][h] <= '0;
      for (int v = 0; v < int'(NV); v++) vbias[v] <= '0;
      for (int h = 0; h < int'(NH); h++) hbias[h] <= '0;
      clamp_en  <= '0;
      clamp_val <= '0;
    end else begin
      if (w_we)  weight[w_v][w_h] <= wdata;
      if (vb_we) vbias[b_v]       <= wdata;
      if (hb_we) hbias[b_h]       <= wdata;
      if (cl_we) begin
        clamp_en[b_v]  <= cl_data[0];
        clamp_val[b_v] <= cl_data[1];
      end
    end
  end
endmodule
