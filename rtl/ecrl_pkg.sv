// ecrl_pkg: types and helpers shared by the ECRL (efficient charge recovery
// logic) gate models.
//
// Every ECRL gate is a differential circuit: two cross-coupled PMOS devices
// sit on the power clock vpc and an NMOS network pulls one of the two output
// nodes low, so the gate always drives a true rail and a complement rail.
// In this digital model the power clock is one bit:
//   vpc = 1  evaluate/hold phase: exactly one rail is high (t = f(x), f = !f(x))
//   vpc = 0  recover phase: the output nodes have given their charge back to
//            the supply and both rails are low.
// A rail pair with both bits low therefore means "no value" rather than 0;
// both bits high never occurs.
package ecrl_pkg;

  // Dual-rail output of an ECRL gate.
  typedef struct packed {
    logic t;  // true output (OUT / z)
    logic f;  // complement output (OUT bar / z bar)
  } rail_t;

  // Drive a rail pair from a logic value under the power clock.
  function automatic rail_t ecrl_drive(input logic vpc, input logic value);
    rail_t r;
    r.t = vpc & value;
    r.f = vpc & ~value;
    return r;
  endfunction

  // A pair is valid when exactly one rail is high.
  function automatic logic rail_valid(input rail_t r);
    return r.t ^ r.f;
  endfunction

endpackage
