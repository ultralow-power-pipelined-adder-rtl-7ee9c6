// tb_ecrl_and_nand: exhaustive self-check of the ECRL AND/NAND gate.
// For every power-clock phase and input combination it compares the rail
// pair with the truth table worked out here: in the evaluate phase (vpc = 1)
// t must equal a && b and f its inverse; in the recover phase both rails are 0.
module tb_ecrl_and_nand;
  import ecrl_pkg::*;

  logic  clk = 1'b0;
  logic  vpc, a, b;
  rail_t z;
  int    checks = 0;
  int    failures = 0;

  ecrl_and_nand dut (.vpc(vpc), .a(a), .b(b), .z(z));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expect_t, expect_f;
    for (int rep = 0; rep < 2; rep++) begin
      for (int v = 0; v < 8; v++) begin
        {vpc, a, b} = 3'(v);
        @(posedge clk);
        expect_t = vpc ? (a && b) : 1'b0;
        expect_f = vpc ? !(a && b) : 1'b0;
        checks++;
        if (z.t !== expect_t || z.f !== expect_f) begin
          failures++;
          $display("FAIL vpc=%0b a=%0b b=%0b: got t=%0b f=%0b, want t=%0b f=%0b",
                   vpc, a, b, z.t, z.f, expect_t, expect_f);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
