// Self-checking testbench of feynman_gate.
// Applies all four input pairs, compares (m, n) with x and x ^ y written out
// as a truth table, and checks that the gate is reversible: the four outputs
// are distinct and a second gate applied to the outputs gives back the inputs.
module tb_feynman_gate;

  int checks = 0;
  int failures = 0;

  logic x, y, m, n;
  logic m2, n2;

  feynman_gate dut (.x(x), .y(y), .m(m), .n(n));
  feynman_gate inv (.x(m), .y(n), .m(m2), .n(n2));

  // Expected {m, n} for inputs {x, y} = 00, 01, 10, 11.
  localparam logic [1:0] EXPECTED [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [3:0] seen;
    seen = '0;
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      #1;
      check({m, n} == EXPECTED[v], $sformatf("x=%b y=%b gave m=%b n=%b", x, y, m, n));
      check({m2, n2} == {x, y}, $sformatf("inverse of x=%b y=%b gave %b%b", x, y, m2, n2));
      check(!seen[{m, n}], $sformatf("output %b%b repeated", m, n));
      seen[{m, n}] = 1'b1;
    end
    // Fan-out use: y = 0 copies x twice.
    for (int v = 0; v < 2; v++) begin
      x = 1'(v); y = 1'b0; #1;
      check(m == x && n == x, "fan-out with y = 0");
      y = 1'b1; #1;
      check(m == x && n == !x, "complement with y = 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
