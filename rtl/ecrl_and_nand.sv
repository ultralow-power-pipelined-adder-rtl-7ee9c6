// ecrl_and_nand: ECRL two-input AND/NAND gate.
//
// Cross-coupled PMOS pair on the power clock vpc; on one side two NMOS devices
// in series (a, b) pull the node low when both inputs are high, on the other
// side two NMOS devices in parallel (a bar, b bar) pull the opposite node low
// when either input is low. The result is AND on z.t and NAND on z.f, and the
// power clock always sees one charged output, whatever the inputs. The
// series/parallel networks follow the published circuit; forming a bar and b bar inside
// the model from single-rail inputs is this model's choice.
//
// Interface: vpc, a, b; z (ecrl_pkg::rail_t: t = a&b, f = !(a&b); both 0 while
//            vpc = 0).
// Timing:    combinational.
module ecrl_and_nand
  import ecrl_pkg::*;
(
  input  logic  vpc,
  input  logic  a,
  input  logic  b,
  output rail_t z
);

  always_comb z = ecrl_drive(vpc, a & b);

endmodule
