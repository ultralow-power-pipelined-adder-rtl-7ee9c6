// tb_ecrl_pipelined_csa: end-to-end self-check of the pipelined ECRL adder at
// its default width (4 bits).
//
// A reference model keeps the operand pairs presented at every rising clock
// edge with vpc = 1 ("valid edge"). After valid edge n the adder must show
// {cout, s} = a + b of the pair presented at valid edge n-2, i.e. a latency
// of three clocks and one result per clock. While vpc = 0 (recover phase)
// s and cout must read 0 and the pipeline must not advance.
//
// Phases:
//   1. directed latency test: one pair 0xF + 0x1 in a stream of zeros; the
//      result 0x10 must appear exactly 3 clocks after it was presented;
//   2. all 256 operand pairs back to back (one per clock);
//   3. random operands with random recover-phase clocks mixed in.
// Mechanisms counted (each must occur at least once): results delivered,
// carry out set, carry rippling through every bit, recover-phase clocks
// that froze the pipeline, results delivered right after a freeze.
module tb_ecrl_pipelined_csa;
  localparam int W       = 4;
  localparam int LATENCY = W - 1;

  logic         clk = 1'b0;
  logic         vpc;
  logic [W-1:0] a, b;
  logic [W-1:0] s;
  logic         cout;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_results = 0;
  int n_cout = 0;
  int n_full_ripple = 0;
  int n_freeze = 0;
  int n_after_freeze = 0;

  ecrl_pipelined_csa dut (.clk(clk), .vpc(vpc), .a(a), .b(b), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: operand pairs accepted at valid edges.
  logic [W-1:0] hist_a[$];
  logic [W-1:0] hist_b[$];
  logic         frozen_last = 1'b0;

  // Drive one clock: present (va, vb) with power-clock phase vv, take the
  // rising edge, then check the outputs at the falling edge.
  task automatic step(input logic vv, input logic [W-1:0] va, input logic [W-1:0] vb);
    logic [W:0] want;
    logic [W:0] got;
    vpc = vv;
    a   = va;
    b   = vb;
    @(posedge clk);
    if (vv) begin
      hist_a.push_back(va);
      hist_b.push_back(vb);
    end
    @(negedge clk);
    got = {cout, s};
    if (!vv) begin
      n_freeze++;
      frozen_last = 1'b1;
      checks++;
      if (got !== '0) begin
        failures++;
        $display("FAIL recover phase: outputs %h, want 0", got);
      end
    end else if (hist_a.size() > LATENCY - 1) begin
      // pair presented LATENCY-1 valid edges before this one
      int idx = hist_a.size() - LATENCY;
      want = {1'b0, hist_a[idx]} + {1'b0, hist_b[idx]};
      checks++;
      n_results++;
      if (frozen_last) n_after_freeze++;
      frozen_last = 1'b0;
      if (want[W]) n_cout++;
      if ((hist_a[idx] ^ hist_b[idx]) == {{(W-1){1'b1}}, 1'b0} && (hist_a[idx][0] & hist_b[idx][0]))
        n_full_ripple++;
      if (got !== want) begin
        failures++;
        $display("FAIL %h + %h: got %h want %h", hist_a[idx], hist_b[idx], got, want);
      end
    end
  endtask

  initial begin
    int lat;
    bit seen;

    // 1. directed latency test
    for (int i = 0; i < 4; i++) step(1'b1, '0, '0);
    vpc = 1'b1;
    a   = '1;
    b   = W'(1);
    lat = 0;
    seen = 1'b0;
    @(posedge clk);
    @(negedge clk);
    a = '0;
    b = '0;
    for (int i = 1; i <= 6 && !seen; i++) begin
      if ({cout, s} == (W + 1)'(1 << W)) begin
        lat  = i;
        seen = 1'b1;
      end else begin
        @(posedge clk);
        @(negedge clk);
      end
    end
    checks++;
    if (lat != LATENCY) begin
      failures++;
      $display("FAIL latency: result after %0d clocks, want %0d", lat, LATENCY);
    end else begin
      $display("latency %0d clocks", lat);
    end
    hist_a.delete();
    hist_b.delete();
    frozen_last = 1'b0;

    // 2. all operand pairs back to back
    for (int i = 0; i < (1 << (2 * W)); i++) step(1'b1, W'(i >> W), W'(i));

    // 3. random operands, recover-phase clocks mixed in
    for (int i = 0; i < 5000; i++)
      step($urandom_range(4) != 0, W'($urandom), W'($urandom));
    // flush
    for (int i = 0; i < LATENCY; i++) step(1'b1, '0, '0);

    $display("results=%0d cout=%0d full_ripple=%0d freeze_clocks=%0d results_after_freeze=%0d",
             n_results, n_cout, n_full_ripple, n_freeze, n_after_freeze);
    if (n_results == 0)      begin failures++; $display("FAIL: no results"); end
    if (n_cout == 0)         begin failures++; $display("FAIL: carry out never set"); end
    if (n_full_ripple == 0)  begin failures++; $display("FAIL: carry never rippled through all bits"); end
    if (n_freeze == 0)       begin failures++; $display("FAIL: recover phase never exercised"); end
    if (n_after_freeze == 0) begin failures++; $display("FAIL: no result after a freeze"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
