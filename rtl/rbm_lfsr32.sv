// 32-bit Fibonacci LFSR random number generator, one per neuron.
//
// Feedback polynomial x^32 + x^22 + x^2 + x + 1 (maximal length, period
// 2^32-1). The register advances eight steps every enabled clock so that
// each 8-bit number uses eight fresh bits; the low byte is the output.
// Each instance takes its own non-zero SEED, so neighbouring neurons start
// at different points of the sequence. A zero seed would lock the LFSR, so
// it is replaced by 1.
//
// Timing: rnd is registered; it changes on the clock edge after en.
// Interface: clk, rst (synchronous, active high), en, rnd[7:0].
module rbm_lfsr32 #(
  parameter logic [31:0] SEED = 32'hACE1_2468
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       en,
  output logic [7:0] rnd
);
  localparam logic [31:0] SEED_NZ = (SEED == 32'd0) ? 32'd1 : SEED;

  logic [31:0] state, next;

  // Eight single-bit steps of the shift register, unrolled.
  always_comb begin
    next = state;
    for (int i = 0; i < 8; i++) begin
      next = {next[30:0], next[31] ^ next[21] ^ next[1] ^ next[0]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst)     state <= SEED_NZ;
    else if (en) state <= next;
  end

  assign rnd = state[7:0];
endmodule
