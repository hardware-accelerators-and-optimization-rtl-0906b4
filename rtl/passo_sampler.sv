// Neuron output sampler and burst writer, in the sampling clock domain.
//
// The asynchronous neuron outputs pass through a two-flop synchronizer.
// The 3-bit preset p (0..4, larger values act as 4) chooses how many
// neurons are sampled and how often: neurons 0 .. (16<<p)-1 once every 2^p
// sampling clocks, from 16 neurons at the full clock rate to all 256 at
// 1/16 of it, so the sampled bit rate is always 16 bits per clock. One
// sample is split into 2^p 16-bit words (word k holds neurons 16k..16k+15,
// neuron 16k in bit 0), written to the SRAM buffer one per clock.
//
// Bursts: a burst fills the whole buffer, DEPTH consecutive words, then
// toggles full_tgl and waits. The next burst starts when drained_tgl,
// toggled by the readout side once it has emptied the buffer, again equals
// full_tgl (two-flop synchronized here). After reset one burst starts at
// once. The preset is latched at the start of each burst.
//
// Timing: wen/waddr/wdata are registered; sample_tick marks each clock on
// which a new sample of the neurons is taken.
module passo_sampler
  import passo_pkg::*;
#(
  parameter int unsigned N     = NEURONS,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     tclk,
  input  logic                     rstb,
  input  logic [N-1:0]             neuron_async,
  input  logic [SAMPLE_CFG-1:0]    preset,
  input  logic                     drained_tgl,
  output logic                     wen,
  output logic [$clog2(DEPTH)-1:0] waddr,
  output logic [WORD-1:0]          wdata,
  output logic                     full_tgl,
  output logic                     sample_tick,
  output logic                     bursting
);
  localparam int unsigned AW     = $clog2(DEPTH);
  localparam int unsigned NWORDS = N / WORD;

  logic [N-1:0] sync1, sync2, snap;
  logic         dr1, dr2;
  logic [2:0]   p;          // latched preset, 0..MAX_PRESET
  logic [3:0]   phase;      // word index inside one sample
  logic [3:0]   last_phase;
  logic [AW-1:0] addr;
  logic [WORD-1:0] word;

  // Synchronizers run through reset so that they hold live values when the
  // first burst starts.
  always_ff @(posedge tclk) begin
    sync1 <= neuron_async;
    sync2 <= sync1;
    dr1   <= drained_tgl;
    dr2   <= dr1;
  end

  assign last_phase  = 4'((1 << p) - 1);
  assign sample_tick = bursting && (phase == '0);

  // Word `phase` of the current sample; word 0 comes straight from the
  // synchronizer, the others from the snapshot taken with it.
  always_comb begin
    word = '0;
    for (int k = 0; k < int'(NWORDS); k++)
      if (phase == 4'(k)) word = (k == 0) ? sync2[WORD-1:0] : snap[k*WORD +: WORD];
  end

  always_ff @(posedge tclk or negedge rstb) begin
    if (!rstb) begin
      bursting <= 1'b0;
      full_tgl <= 1'b0;
      p        <= '0;
      phase    <= '0;
      addr     <= '0;
      snap     <= '0;
      wen      <= 1'b0;
      waddr    <= '0;
      wdata    <= '0;
    end else begin
      wen <= 1'b0;
      if (!bursting) begin
        if (dr2 == full_tgl) begin
          bursting <= 1'b1;
          p        <= (preset > SAMPLE_CFG'(MAX_PRESET)) ? 3'(MAX_PRESET) : 3'(preset);
          phase    <= '0;
          addr     <= '0;
        end
      end else begin
        if (phase == '0) snap <= sync2;
        wen   <= 1'b1;
        waddr <= addr;
        wdata <= word;
        phase <= (phase == last_phase) ? '0 : phase + 1'b1;
        addr  <= addr + 1'b1;
        if (addr == AW'(DEPTH - 1)) begin
          bursting <= 1'b0;
          full_tgl <= ~full_tgl;
        end
      end
    end
  end
endmodule
