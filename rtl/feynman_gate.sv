// Feynman gate (FG): the 2x2 reversible controlled-NOT gate.
//
//   m = x          (control passes through)
//   n = x ^ y      (target is inverted when the control is 1)
//
// The mapping (x, y) -> (m, n) is a bijection and its own inverse. With y tied
// to 0 the gate is the reversible fan-out element (m = n = x); with y tied to 1
// it gives x and its complement. Purely combinational; quantum cost 1.
module feynman_gate (
  input  logic x,
  input  logic y,
  output logic m,
  output logic n
);

  assign m = x;
  assign n = x ^ y;

endmodule
