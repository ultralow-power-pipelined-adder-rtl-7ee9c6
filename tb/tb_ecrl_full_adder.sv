// tb_ecrl_full_adder: exhaustive self-check of the ECRL full adder.
// For all eight input combinations the two outputs must equal the binary
// sum a + b + c (sum = bit 0, carry = bit 1) while vpc = 1, and both must
// be 0 while vpc = 0 (recover phase).
module tb_ecrl_full_adder;
  logic clk = 1'b0;
  logic vpc, a, b, c;
  logic sum, carry;
  int   checks = 0;
  int   failures = 0;

  ecrl_full_adder dut (.vpc(vpc), .a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] total;
    for (int rep = 0; rep < 2; rep++) begin
      for (int v = 0; v < 16; v++) begin
        {vpc, a, b, c} = 4'(v);
        @(posedge clk);
        total = 2'(int'(a) + int'(b) + int'(c));
        if (!vpc) total = 2'b00;
        checks++;
        if ({carry, sum} !== total) begin
          failures++;
          $display("FAIL vpc=%0b a=%0b b=%0b c=%0b: got carry,sum=%b want %b",
                   vpc, a, b, c, {carry, sum}, total);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
