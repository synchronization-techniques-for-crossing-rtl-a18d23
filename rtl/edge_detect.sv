// edge_detect: rising-edge detector.
//
// Registers the input once and outputs d & ~d_prev, so a level that stays
// high for one or more cycles becomes a single-cycle pulse in the same cycle
// the level rises (combinational output, no added latency). Used on the voter
// outputs so that each received transfer is exactly one receiver cycle wide.
// Synchronous active-high reset.
`timescale 1ns / 1ps
module edge_detect (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic pulse
);

  logic d_prev;

  always_ff @(posedge clk) begin
    if (rst) d_prev <= 1'b0;
    else     d_prev <= d;
  end

  assign pulse = d & ~d_prev;

endmodule
