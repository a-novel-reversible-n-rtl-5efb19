// Testbench running rev_counter at several sizes side by side: 2, 3 and
// 4 bits (the sizes for which costs are tabulated) and 8 bits as a larger
// instance of the same n-bit wiring rule. All counters share clock, reset and
// t0. With t0 = 1 each must count modulo 2^N, one count per rising edge; each
// must wrap at least once. Then t0 is driven randomly and every counter is
// compared with the toggle rule of the network (bit 0 toggles with t0, bit i
// when bits i-1..0 are all 1). The garbage bus width is checked against
// 4N-4 (2 side outputs per flip-flop and per AND gate), and the cost
// formulas in rev_pkg are checked against the tabulated 2-, 3- and 4-bit
// figures.
module tb_rev_counter_sizes;

  import rev_pkg::*;

  localparam int NSIZES = 4;
  localparam int SIZES [NSIZES] = '{2, 3, 4, 8};

  int checks = 0;
  int failures = 0;
  int wraps [NSIZES];

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic t0 = 1'b1;

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Per-size counter, reference model and checks at each rising edge.
  for (genvar s = 0; s < NSIZES; s++) begin : g_size
    localparam int unsigned N = SIZES[s];
    logic [N-1:0] q, ref_q, nxt;
    logic         run;
    logic [garbage_width(N)-1:0] garbage;

    rev_counter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .t0(t0), .q(q), .garbage(garbage));

    initial begin
      wraps[s] = 0;
      check($bits(garbage) == 4 * N - 4, $sformatf("N=%0d garbage width %0d", N, $bits(garbage)));
    end

    always @(posedge clk) begin
      if (!rst_n) begin
        ref_q <= '0;
      end else begin
        nxt = ref_q;
        if (t0) nxt[0] = ~nxt[0];
        run = 1'b1;
        for (int i = 1; i < int'(N); i++) begin
          run = run & ref_q[i-1];
          if (run) nxt[i] = ~nxt[i];
        end
        if (t0 && ref_q == '1) wraps[s]++;
        ref_q <= nxt;
      end
    end

    // Compare away from the edge, after both the DUT and model have settled.
    always @(negedge clk) begin
      if (rst_n) check(q == ref_q, $sformatf("N=%0d q=%h expected %h", N, q, ref_q));
      else       check(q == '0, $sformatf("N=%0d not cleared by reset", N));
    end
  end

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Tabulated costs of the 2-, 3- and 4-bit counters:
  // {gates, quantum cost, constant inputs, garbage outputs, delay}.
  localparam int COSTS [3][5] = '{
    '{ 5, 11,  4, 2, 11},
    '{10, 22,  8, 5, 22},
    '{15, 33, 12, 8, 33}
  };

  initial begin
    for (int n = 2; n <= 4; n++) begin
      check(cost_gates(n)           == COSTS[n-2][0], $sformatf("gates n=%0d", n));
      check(cost_quantum(n)         == COSTS[n-2][1], $sformatf("quantum cost n=%0d", n));
      check(cost_constant_inputs(n) == COSTS[n-2][2], $sformatf("constant inputs n=%0d", n));
      check(cost_garbage_outputs(n) == COSTS[n-2][3], $sformatf("garbage outputs n=%0d", n));
      check(cost_delay(n)           == COSTS[n-2][4], $sformatf("delay n=%0d", n));
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (600) @(posedge clk);
    #1;
    // 600 edges at t0 = 1: count equals 600 modulo 2^N.
    check(g_size[0].q == 2'(600), "2-bit count after 600 edges");
    check(g_size[1].q == 3'(600), "3-bit count after 600 edges");
    check(g_size[2].q == 4'(600), "4-bit count after 600 edges");
    check(g_size[3].q == 8'(600), "8-bit count after 600 edges");
    for (int c = 0; c < 400; c++) begin
      t0 = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
    end
    for (int s = 0; s < NSIZES; s++) begin
      $display("N=%0d wraps=%0d", SIZES[s], wraps[s]);
      check(wraps[s] > 0, $sformatf("N=%0d wrapped", SIZES[s]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
