// Sample buffer SRAM: DEPTH words of WIDTH bits, one write port on the
// sampling clock and one read port on the IO clock.
//
// Written as an array so that synthesis maps it to a two-port SRAM macro.
// The read is registered: rdata shows the word at raddr one rclk edge later.
// The buffer is used in bursts (filled completely, then read out), so the
// two ports never touch the same word at the same time.
module passo_sram_buffer #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     wclk,
  input  logic                     wen,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     rclk,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) if (wen) mem[waddr] <= wdata;
  always_ff @(posedge rclk) rdata <= mem[raddr];
endmodule
