// Self-checking testbench of rev_tff.
// Drives t with random values for a few hundred clock edges and compares q
// after every rising edge with a reference bit updated as q ^= t. Also checks
// that q stays put between edges (it is a flip-flop, not a latch), that the
// asynchronous reset clears q without a clock edge, and the garbage outputs
// {t ^ 1, t}. Counts how often the flip-flop toggled and held.
module tb_rev_tff;

  int checks = 0;
  int failures = 0;
  int toggles = 0;
  int holds = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic t = 1'b0;
  logic q;
  logic [1:0] garbage;
  logic ref_q;

  rev_tff dut (.clk(clk), .rst_n(rst_n), .t(t), .q(q), .garbage(garbage));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    check(q == 1'b0, "q is 0 in reset");
    rst_n = 1'b1;
    for (int c = 0; c < 400; c++) begin
      @(negedge clk);
      t = 1'($urandom_range(0, 1));
      #1;
      check(garbage == {~t, t}, "garbage outputs {t^1, t}");
      @(posedge clk);
      #1;
      if (t) toggles++; else holds++;
      ref_q ^= t;
      check(q == ref_q, $sformatf("cycle %0d: q=%b expected %b", c, q, ref_q));
      // No change before the next rising edge, whatever t does.
      t = ~t;
      #3;
      check(q == ref_q, "q changes only at the rising edge");
    end
    // Asynchronous reset in the middle of a cycle.
    @(negedge clk);
    t = 1'b1;
    @(posedge clk);
    #1;
    ref_q ^= 1'b1;
    if (!ref_q) begin
      @(posedge clk);
      #1;
      ref_q = 1'b1;
    end
    check(q == 1'b1, "q is 1 before the reset test");
    #1 rst_n = 1'b0;
    #1;
    check(q == 1'b0, "asynchronous reset clears q");
    rst_n = 1'b1;
    check(toggles > 0, "toggle seen");
    check(holds > 0, "hold seen");
    $display("toggles=%0d holds=%0d", toggles, holds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
