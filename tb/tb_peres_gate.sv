// Self-checking testbench of peres_gate.
// Applies all eight input triples, compares (k, l, m) with a truth table of
// k = x, l = x ^ y, m = xy ^ z, checks that the eight outputs are distinct
// (the gate is a bijection) and that with z = 0 the third output is x AND y.
module tb_peres_gate;

  int checks = 0;
  int failures = 0;

  logic x, y, z, k, l, m;

  peres_gate dut (.x(x), .y(y), .z(z), .k(k), .l(l), .m(m));

  // Expected {k, l, m} for {x, y, z} = 000 .. 111.
  localparam logic [2:0] EXPECTED [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011, 3'b110, 3'b111, 3'b101, 3'b100
  };

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
    bit [7:0] seen;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      check({k, l, m} == EXPECTED[v],
            $sformatf("xyz=%b%b%b gave klm=%b%b%b", x, y, z, k, l, m));
      check(!seen[{k, l, m}], $sformatf("output %b%b%b repeated", k, l, m));
      seen[{k, l, m}] = 1'b1;
      if (!z) check(m == (x & y), "reversible AND with z = 0");
    end
    check(seen == 8'hFF, "all eight outputs reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
