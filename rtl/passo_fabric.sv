// Neuron fabric (behavioural: built from the analog neuron tiles).
//
// ROWS x COLS neurons on a grid. Each neuron's synapse sees its four grid
// neighbours: input 0 north (row-1), 1 east (col+1), 2 south (row+1),
// 3 west (col-1); a neighbour outside the grid reads as 0. Neuron i sits at
// row i / COLS, column i % COLS, and its configuration is
// cfg[i*74 +: 74]. The four-neighbour coupling and the open boundary are
// this model's choice. The chip uses a 16x16 fabric and a 2x2 test cluster.
//
// Timing: asynchronous; outputs change at random instants.
module passo_fabric
  import passo_pkg::*;
#(
  parameter int unsigned R = ROWS,
  parameter int unsigned C = COLS
) (
  input  logic                      rstb_a,
  input  logic [R*C*NEURON_CFG-1:0] cfg,
  output logic [R*C-1:0]            out,
  output logic [DAC_BITS-1:0]       dac_code [R*C]
);
  for (genvar r = 0; r < int'(R); r++) begin : g_row
    for (genvar c = 0; c < int'(C); c++) begin : g_col
      localparam int unsigned I = r * C + c;
      logic [NBR-1:0] h;
      assign h[0] = (r > 0)            ? out[I - C] : 1'b0;
      assign h[1] = (c < int'(C) - 1)  ? out[I + 1] : 1'b0;
      assign h[2] = (r < int'(R) - 1)  ? out[I + C] : 1'b0;
      assign h[3] = (c > 0)            ? out[I - 1] : 1'b0;
      passo_neuron u_n (.rstb_a(rstb_a), .cfg(cfg[I*NEURON_CFG +: NEURON_CFG]),
                        .h(h), .dac_code(dac_code[I]), .out(out[I]));
    end
  end
endmodule
