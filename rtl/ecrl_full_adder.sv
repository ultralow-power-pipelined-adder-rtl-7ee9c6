// ecrl_full_adder: one-bit full adder built from ECRL gates.
//
// Two XOR/XNOR gates form the sum, sum = (a ^ b) ^ c. Three AND/NAND gates,
// used on their NAND rail, form the carry:
//   carry = NAND( NAND(a ^ b, c), NAND(a, b) ) = (a ^ b)&c | a&b.
// This gate-level structure (two XORs and three NANDs) follows the published circuit.
// All five gates share the one power clock vpc; while vpc = 0 (recover
// phase) every gate output, and therefore sum and carry, is 0.
//
// Interface: vpc, a, b, c (carry in); sum, carry (single-rail outputs taken
//            from the true rail of the sum XOR and the NAND rail of the
//            output NAND; the complement rails of the last two gates are not
//            brought out, as in the published symbol).
// Timing:    combinational, three gate levels on the carry path.
module ecrl_full_adder
  import ecrl_pkg::*;
(
  input  logic vpc,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);

  rail_t p;       // a xor b
  rail_t s;       // p xor c
  rail_t pc_n;    // NAND(p, c)
  rail_t ab_n;    // NAND(a, b)
  rail_t co;      // NAND(pc_n, ab_n)

  ecrl_xor_xnor u_xor_ab  (.vpc(vpc), .a(a),      .b(b),      .z(p));
  ecrl_xor_xnor u_xor_sum (.vpc(vpc), .a(p.t),    .b(c),      .z(s));
  ecrl_and_nand u_nand_pc (.vpc(vpc), .a(p.t),    .b(c),      .z(pc_n));
  ecrl_and_nand u_nand_ab (.vpc(vpc), .a(a),      .b(b),      .z(ab_n));
  ecrl_and_nand u_nand_co (.vpc(vpc), .a(pc_n.f), .b(ab_n.f), .z(co));

  // Dual-rail rule: in the evaluate phase each gate drives exactly one rail,
  // in the recover phase none.
  always_comb begin
    if (vpc) begin
      assert (rail_valid(p) && rail_valid(s) && rail_valid(pc_n) &&
              rail_valid(ab_n) && rail_valid(co))
        else $error("ECRL full adder: rail pair not complementary");
    end else begin
      assert ((p | s | pc_n | ab_n | co) == '0)
        else $error("ECRL full adder: rail high in recover phase");
    end
  end

  assign sum   = s.t;
  assign carry = co.f;

endmodule
