// Behavioural model of the neuron's 7-bit DAC (not synthesizable: it drives
// a real-valued voltage).
//
// Converts the synapse's unsigned code into the neuron's input voltage,
// linearly from 0 V at code 0 to VFS at code 127. The full scale of 0.8 V
// matches the neuron's supply swing; the linear transfer is a model choice.
//
// Timing: the output follows the code with delay TD (ps).
module passo_dac #(
  parameter int unsigned BITS = 7,
  parameter real         VFS  = 0.8,
  parameter int unsigned TD   = 100
) (
  input  logic [BITS-1:0] code,
  output real             vout
);
  always @(code) vout <= #(TD * 1ps) VFS * real'(code) / real'((1 << BITS) - 1);

  initial vout = 0.0;
endmodule
