// short_pulse_sync: one copy of the modified short-pulse synchronizer.
//
// A sender pulse that may be shorter than a receiver period sets an SR latch.
// The latch output passes through three receiver flip-flops (FF1, FF2, FF3).
// FF2 clears the latch (feedback), and FF3 is the received signal rcv_sig.
// Timing, counting receiver edges from the first edge e1 that sees the latch
// set: FF1 is high for e1..e3, FF2 (the latch clear) for e2..e4 and rcv_sig
// for e3..e5, i.e. rcv_sig is exactly two receiver cycles wide and appears two
// clocks after capture. The two-cycle width is what lets three copies that
// were captured one clock apart still overlap by at least one cycle, so that
// a voter sees a majority even if one copy is stuck by an upset.
// Protocol for the sender: the pulse must be long enough to set the latch,
// must be low again before the latch clear arrives (at most one receiver
// period is always safe), and the next pulse may only come after the clear
// has dropped (four receiver periods after the set). The exact arrangement of
// the three stages and the feedback tap is this design's reading of the
// modified synchronizer; the unmodified circuit it derives from returns a
// one-cycle signal. Reset (synchronous for the flip-flops, level for the
// latch) is this design's addition. A latch warning is expected (sr_latch).
`timescale 1ns / 1ps
module short_pulse_sync (
  input  logic clk,
  input  logic rst,
  input  logic snd,
  output logic rcv_sig,
  output logic latch_clr
);

  logic latch_q;
  logic ff1, ff2, ff3;

  assign latch_clr = ff2 | rst;

  sr_latch u_latch (
    .s (snd),
    .r (latch_clr),
    .q (latch_q)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      ff1 <= 1'b0;
      ff2 <= 1'b0;
      ff3 <= 1'b0;
    end else begin
      ff1 <= latch_q;
      ff2 <= ff1;
      ff3 <= ff2;
    end
  end

  assign rcv_sig = ff3;

  // The sender pulse must be gone before the latch is cleared.
  a_no_set_during_clear : assert property (@(posedge clk) disable iff (rst)
      !(snd && ff2))
    else $error("short_pulse_sync: set and reset of the latch overlap");

endmodule
