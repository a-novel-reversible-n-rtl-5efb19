// End-to-end testbench of rev_counter at its default size (4 bits).
//
// Phase 1 holds t0 = 1 and checks, one rising edge at a time, the count
// sequence 0000, 0001, ..., 1111, 0000, ... over three full periods: every
// edge must advance the count by exactly one, starting at the first edge
// after reset is released. Phase 2 drives t0 randomly and compares against a
// reference model of the gate network (bit 0 toggles with t0, bit i toggles
// when bits i-1..0 are all 1). Every cycle also checks the garbage outputs.
// Phase 3 asserts the asynchronous reset in the middle of a cycle.
// Mechanisms counted: counting edges, wrap-arounds from all-ones to zero,
// edges with t0 low (bit 0 holds), and resets during a count; each must occur.
module tb_rev_counter;

  import rev_pkg::*;

  localparam int unsigned N  = 4;
  localparam int unsigned GW = garbage_width(N);

  int checks = 0;
  int failures = 0;
  int n_count = 0;
  int n_wrap = 0;
  int n_hold = 0;
  int n_reset = 0;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          t0 = 1'b1;
  logic [N-1:0]  q;
  logic [GW-1:0] garbage;
  logic [N-1:0]  ref_q;

  rev_counter dut (.clk(clk), .rst_n(rst_n), .t0(t0), .q(q), .garbage(garbage));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Toggle inputs of the network for the current state and t0.
  function automatic logic [N-1:0] toggles(input logic [N-1:0] s, input logic t);
    logic [N-1:0] tv;
    logic run;
    tv[0] = t;
    run = 1'b1;
    for (int i = 1; i < N; i++) begin
      run   = run & s[i-1];
      tv[i] = run;
    end
    return tv;
  endfunction

  // Expected garbage bus for the current state and t0.
  function automatic logic [GW-1:0] expected_garbage(input logic [N-1:0] s, input logic t);
    logic [GW-1:0] g;
    logic [N-1:0] tv;
    logic run;
    tv = toggles(s, t);
    for (int i = 0; i < N; i++) g[2*i +: 2] = {~tv[i], tv[i]};
    run = s[0];
    for (int i = 1; i + 1 < N; i++) begin
      g[2*N + 2*(i-1)]     = s[i];
      g[2*N + 2*(i-1) + 1] = s[i] ^ run;
      run = run & s[i];
    end
    return g;
  endfunction

  task automatic step_and_check(input string phase);
    logic [N-1:0] prev_q;
    @(negedge clk);
    check(garbage == expected_garbage(q, t0),
          $sformatf("%s: garbage %h expected %h", phase, garbage, expected_garbage(q, t0)));
    prev_q = ref_q;
    ref_q = ref_q ^ toggles(ref_q, t0);
    if (t0) n_count++; else n_hold++;
    if (t0 && prev_q == '1 && ref_q == '0) n_wrap++;
    @(posedge clk);
    #1;
    check(q == ref_q, $sformatf("%s: q=%b expected %b (was %b, t0=%b)",
                                phase, q, ref_q, prev_q, t0));
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = '0;
    repeat (3) @(posedge clk);
    #1;
    check(q == '0, "count is 0 during reset");

    // Phase 1: free counting, one count per edge from the first edge.
    rst_n = 1'b1;
    for (int c = 1; c <= 3 * (1 << N); c++) begin
      step_and_check("count");
      check(int'(q) == c % (1 << N), $sformatf("after %0d edges q=%0d", c, q));
    end

    // Phase 2: random t0.
    for (int c = 0; c < 300; c++) begin
      t0 = ($urandom_range(0, 3) != 0);
      step_and_check("random t0");
    end

    // Phase 3: asynchronous reset in mid-cycle, then counting again.
    t0 = 1'b1;
    while (q == '0) step_and_check("before reset");
    #2 rst_n = 1'b0;
    #1;
    check(q == '0, "asynchronous reset clears the count");
    n_reset++;
    ref_q = '0;
    rst_n = 1'b1;
    for (int c = 1; c <= 5; c++) begin
      step_and_check("after reset");
      check(int'(q) == c % (1 << N), "count restarts at 1 after reset");
    end

    $display("counting edges=%0d wraps=%0d holds=%0d resets=%0d",
             n_count, n_wrap, n_hold, n_reset);
    check(n_count > 0, "counting happened");
    check(n_wrap > 0, "wrap-around happened");
    check(n_hold > 0, "t0 low happened");
    check(n_reset > 0, "mid-count reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
