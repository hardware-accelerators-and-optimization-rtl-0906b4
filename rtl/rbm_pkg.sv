// Shared constants and types of the RBM Gibbs sampler.
//
// The sampler stores signed fixed-point weights and biases and produces
// binary node states. The widths here are this design's choice: 8-bit
// weights and biases, an 8-bit sigmoid probability compared with an 8-bit
// random number. The host programs the sampler through a small
// memory-mapped write port whose map is defined here.
package rbm_pkg;
  localparam int unsigned WBITS     = 8;   // weight and bias width (signed)
  localparam int unsigned PBITS     = 8;   // probability / random number width
  localparam int unsigned ADDR_BITS = 16;  // host address width
  localparam int unsigned DATA_BITS = 16;  // host data width

  // Address map: the top two address bits select the region, the rest are
  // the offset inside it.
  typedef enum logic [1:0] {
    REG_WEIGHT = 2'd0,  // offset = v * NH + h
    REG_VBIAS  = 2'd1,  // offset = v
    REG_HBIAS  = 2'd2,  // offset = h
    REG_CTRL   = 2'd3   // offset 0: run length; offset 1+v: clamp of visible v
  } region_e;

  typedef struct packed {
    logic                 valid;
    logic [ADDR_BITS-1:0] addr;
    logic [DATA_BITS-1:0] data;
  } host_wr_t;
endpackage
