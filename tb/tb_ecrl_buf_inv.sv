// tb_ecrl_buf_inv: exhaustive self-check of the ECRL buffer/inverter.
// In the evaluate phase (vpc = 1) out.t must equal in and out.f its inverse;
// in the recover phase (vpc = 0) both rails must be 0.
module tb_ecrl_buf_inv;
  import ecrl_pkg::*;

  logic  clk = 1'b0;
  logic  vpc, in;
  rail_t out;
  int    checks = 0;
  int    failures = 0;

  ecrl_buf_inv dut (.vpc(vpc), .in(in), .out(out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] want;
    for (int rep = 0; rep < 2; rep++) begin
      for (int v = 0; v < 4; v++) begin
        {vpc, in} = 2'(v);
        @(posedge clk);
        case ({vpc, in})
          2'b11:   want = 2'b10;
          2'b10:   want = 2'b01;
          default: want = 2'b00;
        endcase
        checks++;
        if ({out.t, out.f} !== want) begin
          failures++;
          $display("FAIL vpc=%0b in=%0b: got %b want %b", vpc, in, {out.t, out.f}, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
