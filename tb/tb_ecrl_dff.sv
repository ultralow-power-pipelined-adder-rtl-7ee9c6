// tb_ecrl_dff: self-check of the ECRL D flip-flop.
// A reference bit is updated on every rising clock edge at which vpc = 1
// and kept otherwise. After each edge q must equal that bit while vpc = 1
// and read 0 while vpc = 0. Inputs change on the falling edge, so the test
// also shows that d between edges has no effect (edge triggering).
module tb_ecrl_dff;
  logic clk = 1'b0;
  logic vpc, d, q;
  logic ref_q;
  logic ref_known = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   holds = 0;

  ecrl_dff dut (.clk(clk), .vpc(vpc), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vpc = 1'b1;
    d   = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // check the state captured at the previous rising edge
      if (ref_known) begin
        checks++;
        if (q !== (vpc & ref_q)) begin
          failures++;
          $display("FAIL cycle %0d: vpc=%0b q=%0b want %0b", n, vpc, q, vpc & ref_q);
        end
      end
      // after a recover-phase edge, restore the power clock between edges:
      // the bit stored before the recover phase must reappear
      if (ref_known && !vpc) begin
        vpc = 1'b1;
        #1;
        checks++;
        if (q !== ref_q) begin
          failures++;
          $display("FAIL cycle %0d: bit lost over recover phase, q=%0b want %0b", n, q, ref_q);
        end
      end
      // new stimulus: vpc low about one cycle in four
      vpc = ($urandom_range(3) != 0);
      d   = 1'($urandom);
      // glitch d between edges: must not be captured
      #1 d = ~d;
      #1 d = ~d;
      @(posedge clk);
      if (vpc) begin
        ref_q     = d;
        ref_known = 1'b1;
      end else begin
        holds++;
      end
    end
    if (holds == 0) begin
      failures++;
      $display("FAIL: recover-phase hold never exercised");
    end
    $display("recover-phase edges: %0d", holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
