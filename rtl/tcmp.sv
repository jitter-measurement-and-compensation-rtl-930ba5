// tcmp: one timing comparator (TCMP) of the stochastic time-to-digital
// converter.
//
// The circuit in the document is a latch (two input devices driven by V1 and
// V2, a cross-coupled pair and always-on loads) that decides which of its two
// inputs rose first: vo = 1 when t_d > t_os, where t_d is the time from the
// rising edge of v1 to the rising edge of v2 and t_os is the comparator's own
// offset caused by device and wiring mismatch. Its digital equivalent is a
// flip-flop clocked by v2 that samples v1: v1 is already high at the v2 edge
// exactly when v1 rose first.
//
// Here the offset is modelled by a transport delay: for t_os >= 0 the sampled copy of
// v1 is delayed by t_os, for t_os < 0 the clock copy of v2 is delayed by
// -t_os, so the flip-flop captures 1 exactly when t_d > t_os. The delays are
// simulation-only (synthesis ignores them, as the real offsets come from
// mismatch, not from a designed delay); synthesized, the block is one
// flip-flop. vo changes at the v2 edge, or up to -t_os later, and holds until
// the next v2 edge; a t_d exactly equal to t_os may go either way. A
// register clocked by v2 (or by a clock in phase with it) reads this edge's
// decision at the following edge. Both clocks must stay high for longer than
// |t_os| and |t_d|.
//
// The comparison rule and the per-comparator offset follow the document; the
// flip-flop form and the delay model of the offset are this design's own.
module tcmp #(
  parameter real TOS_PS = 0.0
) (
  input  logic v1,
  input  logic v2,
  output logic vo
);
  logic v1_s;
  logic v2_s;

  // The delayed copies start low, like the clocks they follow (lint notes
  // the initial value on a procedurally assigned variable; it is deliberate,
  // so that the first decision after start-up is defined).
  if (TOS_PS >= 0.0) begin : g_pos
    logic v1_d = 1'b0;
    always @(v1) v1_d <= #(TOS_PS * 1ps) v1;
    assign v1_s = v1_d;
    assign v2_s = v2;
  end else begin : g_neg
    logic v2_d = 1'b0;
    always @(v2) v2_d <= #(-TOS_PS * 1ps) v2;
    assign v1_s = v1;
    assign v2_s = v2_d;
  end

  always_ff @(posedge v2_s) vo <= v1_s;

endmodule
