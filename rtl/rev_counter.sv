// Reversible N-bit synchronous binary up-counter.
//
// The counter is a chain of N reversible T flip-flops (rev_tff) on one common
// clock. Bit 0 toggles on every rising edge while t0 is 1; bit i toggles when
// all lower bits are 1, so the count runs 0, 1, ..., 2^N-1, 0, ... . Every
// gate is reversible: a net may drive only one gate input, so each value that
// is needed twice is copied by a Feynman gate with a 0 input, and the toggle
// inputs T_i = Q_{i-1} ... Q_1 Q_0 are formed by Peres gates with a 0 third
// input, used as reversible AND gates.
//
// Wiring, bit by bit:
//   bit 0      : T_0 = t0. For N >= 3 two Feynman gates make three copies of
//                Q_0: the output q[0], T_1 and the first AND operand. For
//                N = 2 one Feynman gate gives q[0] and T_1.
//   bit 1..N-2 : one Feynman gate copies Q_i to q[i] and to a Peres gate that
//                forms Q_i . (Q_{i-1} ... Q_0). Except after the last such gate,
//                a Feynman gate copies the product to T_{i+1} and to the next
//                Peres gate; the last product is T_{N-1} directly.
//   bit N-1    : the flip-flop output is q[N-1]; nothing else reads it.
// For N = 4 this is 15 reversible gates: 6 Peres and 9 Feynman gates.
//
// Note that T_1 is Q_0, not t0 . Q_0: with t0 = 0, bit 0 holds but the higher
// bits still toggle whenever Q_0 is 1. The counter is meant to run with t0
// tied to 1.
//
// Interface and timing: q is registered and changes only on a rising edge of
// clk, one count per edge, with no latency beyond that edge. rst_n is an
// asynchronous active-low reset to count 0 (this design's choice). garbage
// carries the unused side outputs of the Peres gates: bits [2i+1:2i] are
// flip-flop i's {T_i ^ CLK, T_i}, followed by {Q_i ^ P, Q_i} of the AND gate of
// bit i, i = 1 .. N-2, where P is the running product of the lower bits. The
// gate-level structure follows the published n-bit counter; the reset, the
// rising edge and the garbage bus are this design's choices. garbage[0] is
// the K output of bit 0's Peres gate and so equals t0.
//
// A simulation-time immediate assertion checks that every edge with t0 = 1
// advances the count by exactly one, modulo 2^N.
module rev_counter
  import rev_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        t0,
  output logic [N-1:0]                q,
  output logic [garbage_width(N)-1:0] garbage
);

  localparam int unsigned GW = garbage_width(N);

  if (N < 1) begin : g_bad_size
    $error("rev_counter: N must be at least 1");
  end

  logic [N-1:0] tff_q;   // flip-flop outputs Q_i
  logic [N-1:0] tog;     // toggle inputs T_i
  logic [N-1:0] and_b;   // second AND operand of bit i: Q_{i-1} ... Q_0
  logic [N-1:0] q_copy;  // copy of Q_i fed to the AND gate of bit i
  logic [N-1:0] prod;    // AND gate output of bit i: Q_i ... Q_0

  assign tog[0] = t0;

  // Flip-flops, one per bit, all on the common clock.
  for (genvar i = 0; i < N; i++) begin : g_tff
    rev_tff u_tff (
      .clk     (clk),
      .rst_n   (rst_n),
      .t       (tog[i]),
      .q       (tff_q[i]),
      .garbage (garbage[2*i+1 -: 2])
    );
  end

  // Bit 0 fan-out.
  if (N == 1) begin : g_bit0_only
    assign q[0] = tff_q[0];
  end else begin : g_bit0
    logic c0;
    feynman_gate u_fg_out (.x(tff_q[0]), .y(1'b0), .m(q[0]), .n(c0));
    if (N == 2) begin : g_direct
      assign tog[1] = c0;
    end else begin : g_split
      feynman_gate u_fg_split (.x(c0), .y(1'b0), .m(tog[1]), .n(and_b[1]));
    end
  end

  // Middle bits: fan-out, AND with the lower bits, fan-out of the product.
  for (genvar i = 1; i + 1 < N; i++) begin : g_mid
    feynman_gate u_fg_out (.x(tff_q[i]), .y(1'b0), .m(q[i]), .n(q_copy[i]));
    peres_gate u_pg_and (
      .x (q_copy[i]),
      .y (and_b[i]),
      .z (1'b0),
      .k (garbage[2*N + 2*(i-1)]),
      .l (garbage[2*N + 2*(i-1) + 1]),
      .m (prod[i])
    );
    if (i + 2 < N) begin : g_split
      feynman_gate u_fg_split (.x(prod[i]), .y(1'b0), .m(tog[i+1]), .n(and_b[i+1]));
    end else begin : g_last
      assign tog[i+1] = prod[i];
    end
  end

  // Most significant bit.
  if (N >= 2) begin : g_msb
    assign q[N-1] = tff_q[N-1];
  end

  // Signals that some sizes leave without a driver or reader.
  if (N < 3) begin : g_no_chain
    assign and_b  = '0;
    assign q_copy = '0;
    assign prod   = '0;
  end else begin : g_chain_ends
    assign and_b[0]    = 1'b0;
    assign and_b[N-1]  = 1'b0;
    assign q_copy[0]   = 1'b0;
    assign q_copy[N-1] = 1'b0;
    assign prod[0]     = 1'b0;
    assign prod[N-1]   = 1'b0;
  end

  // One count per rising edge while t0 is held at 1.
  logic [N-1:0] q_prev;
  logic         t0_prev;
  logic         valid_prev;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_prev     <= '0;
      t0_prev    <= 1'b0;
      valid_prev <= 1'b0;
    end else begin
      q_prev     <= q;
      t0_prev    <= t0;
      valid_prev <= 1'b1;
      if (valid_prev && t0_prev)
        assert (q == N'(q_prev + 1'b1))
          else $error("rev_counter: count %0d did not follow %0d", q, q_prev);
    end
  end

  initial assert (GW == 2 * N + ((N > 2) ? 2 * (N - 2) : 0));

endmodule
