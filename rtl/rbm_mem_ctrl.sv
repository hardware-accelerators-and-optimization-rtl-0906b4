// Memory controller: decodes memory-mapped host writes.
//
// A write carries a 16-bit address and 16-bit data. The top two address
// bits choose the region (weights, visible biases, hidden biases, control)
// and the rest is the offset; the map is in rbm_pkg. Weight offsets are
// v*NH + h. In the control region offset 0 starts a run of data samples
// and offset 1+v writes the clamp of visible node v as {value, enable} in
// data[1:0]. Offsets beyond the array are ignored.
//
// Timing: combinational decode; the memories write on the next clock edge.
module rbm_mem_ctrl
  import rbm_pkg::*;
#(
  parameter int unsigned NV = 32,
  parameter int unsigned NH = 32
) (
  input  host_wr_t                 wr,
  output logic                     w_we,
  output logic [$clog2(NV)-1:0]    w_v,
  output logic [$clog2(NH)-1:0]    w_h,
  output logic                     vb_we,
  output logic                     hb_we,
  output logic                     cl_we,
  output logic [$clog2(NV)-1:0]    b_v,
  output logic [$clog2(NH)-1:0]    b_h,
  output logic signed [WBITS-1:0]  wdata,
  output logic [1:0]               cl_data,
  output logic                     run_we,
  output logic [DATA_BITS-1:0]     run_len
);
  localparam int unsigned OFS_BITS = ADDR_BITS - 2;

  region_e             region;
  logic [OFS_BITS-1:0] ofs;
  logic [OFS_BITS-1:0] clamp_ofs;

  assign region    = region_e'(wr.addr[ADDR_BITS-1 -: 2]);
  assign ofs       = wr.addr[OFS_BITS-1:0];
  assign clamp_ofs = ofs - OFS_BITS'(1);

  assign wdata   = wr.data[WBITS-1:0];
  assign cl_data = wr.data[1:0];
  assign run_len = wr.data;

  always_comb begin
    w_we   = 1'b0;
    vb_we  = 1'b0;
    hb_we  = 1'b0;
    cl_we  = 1'b0;
    run_we = 1'b0;
    w_v    = '0;
    w_h    = '0;
    b_v    = '0;
    b_h    = '0;
    unique case (region)
      REG_WEIGHT: begin
        w_we = wr.valid && (32'(ofs) < NV * NH);
        w_v  = $clog2(NV)'(32'(ofs) / NH);
        w_h  = $clog2(NH)'(32'(ofs) % NH);
      end
      REG_VBIAS: begin
        vb_we = wr.valid && (32'(ofs) < NV);
        b_v   = $clog2(NV)'(ofs);
      end
      REG_HBIAS: begin
        hb_we = wr.valid && (32'(ofs) < NH);
        b_h   = $clog2(NH)'(ofs);
      end
      REG_CTRL: begin
        run_we = wr.valid && (ofs == '0);
        cl_we  = wr.valid && (ofs != '0) && (32'(clamp_ofs) < NV);
        b_v    = $clog2(NV)'(clamp_ofs);
      end
      default: ;
    endcase
  end
endmodule
