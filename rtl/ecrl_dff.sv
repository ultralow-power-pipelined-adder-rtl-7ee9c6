// ecrl_dff: D flip-flop for an ECRL pipeline.
//
// The flip-flop is built like a NAND set/reset flip-flop: an ECRL
// buffer/inverter turns d into a rail pair (d, d bar); on the rising edge of
// clk the true rail sets and the complement rail resets the stored bit, and
// the output stage, also powered by the power clock vpc, drives q.
// While vpc = 0 (recover phase) the input inverter gives no rail, so a clock
// edge then neither sets nor resets and the stored bit is kept; q reads 0
// in that phase and the stored value again once vpc returns to 1.
// The NAND/inverter composition follows the published circuit. Its schematic is a
// clock-gated NAND latch while its description calls the flip-flop edge triggered;
// this model follows the description and captures on the rising edge.
// There is no reset: the stored bit starts undefined, as in the published circuit, which has no reset.
//
// Interface: clk, vpc, d; q.
// Timing:    q takes the value of d at the rising edge of clk (when vpc = 1).
module ecrl_dff
  import ecrl_pkg::*;
(
  input  logic clk,
  input  logic vpc,
  input  logic d,
  output logic q
);

  rail_t d_rail;   // (d, d bar) from the input buffer/inverter
  rail_t q_rail;
  logic  state;

  ecrl_buf_inv u_in (.vpc(vpc), .in(d), .out(d_rail));

  // Set on the true rail, reset on the complement rail, hold on neither.
  always_ff @(posedge clk) begin
    if (d_rail.t)      state <= 1'b1;
    else if (d_rail.f) state <= 1'b0;
  end

  ecrl_buf_inv u_out (.vpc(vpc), .in(state), .out(q_rail));

  always_comb begin
    if (vpc) assert (rail_valid(q_rail) && rail_valid(d_rail))
      else $error("ECRL flip-flop: rail pair not complementary");
  end

  assign q = q_rail.t;

endmodule
