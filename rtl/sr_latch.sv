// sr_latch: level-sensitive set/reset latch, the front end of the
// short-pulse synchronizer.
//
// A high level on s sets q; a high level on r clears it; with both low q
// holds. Set and reset arrive from different clock domains and are not
// clocked, which is the point of the circuit: a sender pulse shorter than a
// receiver period is caught without sampling it. The protocol forbids s and r
// high together; in that case this model lets the reset win (the real latch
// would be undefined). It is a deliberate latch: a latch warning from
// synthesis is expected for this module.
`timescale 1ns / 1ps
module sr_latch (
  input  logic s,
  input  logic r,
  output logic q
);

  always_latch begin
    if (r)      q = 1'b0;
    else if (s) q = 1'b1;
  end

endmodule
