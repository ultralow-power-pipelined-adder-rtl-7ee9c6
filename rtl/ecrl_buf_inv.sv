// ecrl_buf_inv: ECRL buffer/inverter.
//
// Two cross-coupled PMOS devices on the power clock vpc hold the result; one
// NMOS device per side, driven by IN and by its complement, pulls the opposite
// output low. The gate therefore gives the buffered value on out.t and the
// inverted value on out.f in the same circuit. The topology follows the
// published ECRL buffer/inverter; taking a single-rail input and forming
// its complement inside the model is this model's choice.
//
// Interface: vpc (power clock phase, 1 = evaluate/hold), in (data),
//            out (ecrl_pkg::rail_t: t = in, f = !in; both 0 while vpc = 0).
// Timing:    combinational; the output follows the power clock.
module ecrl_buf_inv
  import ecrl_pkg::*;
(
  input  logic  vpc,
  input  logic  in,
  output rail_t out
);

  always_comb out = ecrl_drive(vpc, in);

endmodule
