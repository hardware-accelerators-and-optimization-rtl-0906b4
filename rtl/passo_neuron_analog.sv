// Behavioural model of the stochastic analog neuron (not synthesizable:
// real-valued input, random delays).
//
// The chip amplifies transistor shot noise into a Poisson clock and passes
// it with the input voltage through a sigmoid comparator and an inverter,
// giving a binary output that switches at random times. This model draws
// the switching instants from an exponential distribution of mean TAU_PS
// and, at each instant, sets the output to 1 with probability
// sigmoid((vin - V_MID) / V_SLOPE). With the defaults the output is almost
// always 0 at 0.1 V, half the time 1 near 0.42 V and mostly 1 at 0.6 V,
// following the measured activation curve of the 14 nm neuron. The output
// is held at 0 while rstb_a is low.
//
// Interface: vin (V), rstb_a (active-low analog reset), vout (digital).
module passo_neuron_analog #(
  parameter real         V_MID   = 0.42,
  parameter real         V_SLOPE = 0.06,
  parameter int unsigned TAU_PS  = 10000
) (
  input  real  vin,
  input  logic rstb_a,
  output logic vout
);
  real u, dt, pr;

  initial begin
    vout = 1'b0;
    forever begin
      u  = (real'($urandom % 1000000) + 0.5) / 1000000.0;
      dt = -real'(TAU_PS) * $ln(u);
      #(dt * 1ps);
      pr = 1.0 / (1.0 + $exp(-(vin - V_MID) / V_SLOPE));
      u  = real'($urandom % 1000000) / 1000000.0;
      vout = rstb_a && (u < pr);
    end
  end
endmodule
