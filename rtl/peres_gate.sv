// Peres gate (PG): a 3x3 reversible gate.
//
//   k = x
//   l = x ^ y
//   m = (x & y) ^ z
//
// With z tied to 0 the third output is x & y, so the gate serves as a
// reversible AND whose other two outputs carry enough information to recover
// the inputs. The mapping (x, y, z) -> (k, l, m) is a bijection. Purely
// combinational; quantum cost 4 (two controlled-V+, one CNOT, one controlled-V).
module peres_gate (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic k,
  output logic l,
  output logic m
);

  assign k = x;
  assign l = x ^ y;
  assign m = (x & y) ^ z;

endmodule
