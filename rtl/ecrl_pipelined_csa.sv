// ecrl_pipelined_csa: WIDTH-bit pipelined adder in efficient charge recovery
// logic (ECRL), the top of the design.
//
// The adder is a chain of ECRL full adders, one per bit, cut into WIDTH
// pipeline stages by ECRL D flip-flops. Bit i is added in stage i:
//   - its operands a[i], b[i] reach the full adder through i flip-flops,
//   - the carry of bit i reaches bit i+1 through one flip-flop, so it arrives
//     in the same clock as that bit's delayed operands,
//   - its sum leaves through WIDTH-1-i flip-flops, so all sum bits of one
//     operand pair leave together.
// Bit 0 has its carry input tied to 0. The last stage drives s[WIDTH-1] and
// cout straight from its full adder. For WIDTH = 4 this takes 21 flip-flops
// and 4 full adders; a new operand pair is accepted every clock and its sum
// appears WIDTH-1 = 3 clocks later. The structure, the widths and the
// 3-clock latency follow the published circuit; the
// WIDTH parameter and the one-bit model of the power clock are this RTL's own.
//
// Power clock: vpc = 1 is the evaluate/hold phase. While vpc = 0 every
// ECRL gate output is 0 and the flip-flops keep their bits, so clock edges in
// that phase freeze the whole pipeline and s/cout read 0; when vpc returns
// to 1 the pipeline carries on where it stopped. There is no reset; outputs
// are meaningful from the WIDTH-1-th clock after the first operands.
//
// Interface: clk, vpc, a[WIDTH-1:0], b[WIDTH-1:0]; s[WIDTH-1:0], cout.
// Timing:    operands presented before rising edge k give s, cout after edge
//            k+WIDTH-1 (with vpc = 1 at every edge in between).
module ecrl_pipelined_csa #(
  parameter int WIDTH = 4
) (
  input  logic             clk,
  input  logic             vpc,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] s,
  output logic             cout
);

  // Carry into each bit's full adder, and carry out of each full adder.
  logic [WIDTH-1:0] c_in;
  logic [WIDTH-1:0] c_out;

  assign c_in[0] = 1'b0;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    // Operand delay lines: a_d[0] is the port, a_d[i] feeds the full adder.
    logic [i:0] a_d;
    logic [i:0] b_d;
    // Sum delay line: s_d[0] is the full adder, s_d[WIDTH-1-i] the port.
    logic [WIDTH-1-i:0] s_d;

    assign a_d[0] = a[i];
    assign b_d[0] = b[i];

    for (genvar k = 0; k < i; k++) begin : g_in
      ecrl_dff u_a (.clk(clk), .vpc(vpc), .d(a_d[k]), .q(a_d[k+1]));
      ecrl_dff u_b (.clk(clk), .vpc(vpc), .d(b_d[k]), .q(b_d[k+1]));
    end

    ecrl_full_adder u_fa (
      .vpc  (vpc),
      .a    (a_d[i]),
      .b    (b_d[i]),
      .c    (c_in[i]),
      .sum  (s_d[0]),
      .carry(c_out[i])
    );

    for (genvar k = 0; k < WIDTH - 1 - i; k++) begin : g_out
      ecrl_dff u_s (.clk(clk), .vpc(vpc), .d(s_d[k]), .q(s_d[k+1]));
    end

    assign s[i] = s_d[WIDTH-1-i];

    if (i < WIDTH - 1) begin : g_carry
      ecrl_dff u_c (.clk(clk), .vpc(vpc), .d(c_out[i]), .q(c_in[i+1]));
    end
  end

  assign cout = c_out[WIDTH-1];

endmodule
