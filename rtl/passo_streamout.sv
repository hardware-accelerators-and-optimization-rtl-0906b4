// Sample readout and serializer, in the IO clock domain.
//
// When the sampler signals a full buffer (full_tgl differs from
// drained_tgl after a two-flop synchronizer) the whole buffer is read, word
// 0 first, and each 16-bit word is sent most significant bit first on
// sample_streamout, one bit per IO clock in which streamout_tx_valid and
// streamout_rx_ready are both high. The next word is fetched while the
// current one shifts out, so with rx_ready held high a word leaves every 16
// IO clocks (1.25 MHz at a 20 MHz IO clock). After the last bit the
// module toggles drained_tgl, which re-arms the sampler.
//
// Timing: the SRAM read port has one clock of latency; tx_valid and the
// data bit are registered state and hold while rx_ready is low.
module passo_streamout
  import passo_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     ioclk,
  input  logic                     rstb,
  input  logic                     full_tgl,
  output logic                     drained_tgl,
  output logic [$clog2(DEPTH)-1:0] raddr,
  input  logic [WORD-1:0]          rdata,
  output logic                     streamout_tx_valid,
  input  logic                     streamout_rx_ready,
  output logic                     sample_streamout,
  output logic                     word_done
);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_LOAD, S_SHIFT} state_e;

  state_e         state;
  logic           f1, f2;
  logic [WORD-1:0] shreg;
  logic [3:0]     bitcnt;
  logic [AW-1:0]  wcnt;

  assign streamout_tx_valid = (state == S_SHIFT);
  assign sample_streamout   = shreg[WORD-1];
  assign word_done = (state == S_SHIFT) && streamout_rx_ready && (bitcnt == 4'(WORD - 1));

  always_ff @(posedge ioclk or negedge rstb) begin
    if (!rstb) begin
      f1          <= 1'b0;
      f2          <= 1'b0;
      state       <= S_IDLE;
      drained_tgl <= 1'b0;
      raddr       <= '0;
      shreg       <= '0;
      bitcnt      <= '0;
      wcnt        <= '0;
    end else begin
      f1 <= full_tgl;
      f2 <= f1;
      unique case (state)
        S_IDLE: if (f2 != drained_tgl) begin
          raddr <= '0;
          wcnt  <= '0;
          state <= S_FETCH;
        end
        S_FETCH: state <= S_LOAD;
        S_LOAD: begin
          shreg  <= rdata;
          raddr  <= raddr + 1'b1;
          bitcnt <= '0;
          state  <= S_SHIFT;
        end
        S_SHIFT: if (streamout_rx_ready) begin
          if (bitcnt == 4'(WORD - 1)) begin
            if (wcnt == AW'(DEPTH - 1)) begin
              drained_tgl <= ~drained_tgl;
              state       <= S_IDLE;
            end else begin
              shreg  <= rdata;
              raddr  <= raddr + 1'b1;
              wcnt   <= wcnt + 1'b1;
              bitcnt <= '0;
            end
          end else begin
            shreg  <= {shreg[WORD-2:0], 1'b0};
            bitcnt <= bitcnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
