// ecrl_xor_xnor: ECRL two-input XOR/XNOR gate.
//
// Cross-coupled PMOS pair on the power clock vpc over an NMOS network of
// a / a bar and b / b bar devices with crossed connections, so that one output
// node is pulled low when the inputs are equal and the other when they differ.
// The model gives XOR on z.t and XNOR on z.f. Forming the complement inputs
// inside the model from single-rail a and b is this model's choice.
//
// Interface: vpc, a, b; z (ecrl_pkg::rail_t: t = a^b, f = !(a^b); both 0 while
//            vpc = 0).
// Timing:    combinational.
module ecrl_xor_xnor
  import ecrl_pkg::*;
(
  input  logic  vpc,
  input  logic  a,
  input  logic  b,
  output rail_t z
);

  always_comb z = ecrl_drive(vpc, a ^ b);

endmodule
