// Reversible T flip-flop built from one Peres gate and one Feynman gate.
//
// The flip-flop realises Q+ = (T . CLK) ^ Q. The Peres gate takes (T, CLK, Q):
// its third output T.CLK ^ Q is the next state. A Feynman gate with its second
// input tied to 0 makes two copies of the state: one is the output q, the
// other is fed back to the Peres gate's Q input. A reversible network may not
// contain feedback, so the loop is closed through a storage element: a
// register on the wire between the two gates, clocked on the rising edge of
// clk. The loop therefore runs PG -> register -> FG -> (q, copy back to PG).
//
// The Peres gate's CLK input is driven with 1, the value of the clock while it
// is asserted, so the gate computes the value the state takes at the next
// rising edge (T ^ Q). Its other two outputs (T and T ^ CLK) are not used by
// the counter and come out as garbage.
//
// Interface and timing: q changes only on a rising edge of clk, to q ^ t with
// t sampled at that edge. rst_n is an asynchronous active-low reset to q = 0.
// The two-gate structure and its feedback follow the published T flip-flop;
// the rising-edge register, the constant 1 on the gate's clock input and the
// reset are this design's own choices.
module rev_tff (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       t,
  output logic       q,
  output logic [1:0] garbage   // {T ^ CLK, T} side outputs of the Peres gate
);

  localparam logic CLK_ASSERTED = 1'b1;

  logic next_state;  // PG third output: T.CLK ^ Q
  logic state;       // next_state registered at the rising edge
  logic fb_copy;     // FG second output, the copy fed back to the PG
  logic pg_k, pg_l;

  peres_gate u_pg (
    .x (t),
    .y (CLK_ASSERTED),
    .z (fb_copy),
    .k (pg_k),
    .l (pg_l),
    .m (next_state)
  );

  // Fan-out of the stored state: m is the output, n the copy fed back.
  feynman_gate u_fg (
    .x (state),
    .y (1'b0),
    .m (q),
    .n (fb_copy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= 1'b0;
    else        state <= next_state;
  end

  assign garbage = {pg_l, pg_k};

endmodule
