// Configuration shift register chain.
//
// LEN flip-flops clocked by the configuration clock. While shift_en is high
// each cclk rising edge moves the chain one place toward bit 0: shift_in
// enters at bit LEN-1 and bit 0 leaves on shift_out. After LEN shifts the
// first bit sent sits in bit 0, so a host sends bit 0 first. The chip chains
// the configuration of every neuron, the bias trims and the sampling preset
// into one such register; the parallel outputs hold the settings.
// rstb_cfg clears the chain asynchronously (active low).
//
// Timing: one bit per cclk cycle with shift_en high; shift_out is registered.
module passo_cfg_chain #(
  parameter int unsigned LEN = 19171
) (
  input  logic           cclk,
  input  logic           rstb_cfg,
  input  logic           shift_en,
  input  logic           shift_in,
  output logic           shift_out,
  output logic [LEN-1:0] cfg
);
  always_ff @(posedge cclk or negedge rstb_cfg) begin
    if (!rstb_cfg)     cfg <= '0;
    else if (shift_en) cfg <= {shift_in, cfg[LEN-1:1]};
  end

  assign shift_out = cfg[0];
endmodule
