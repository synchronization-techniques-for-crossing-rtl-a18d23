// pulse_counter: receiver-domain counter of received pulses.
//
// Adds one for every cycle in which pulse is high; the input is expected to
// be a single-cycle pulse per transfer (from an edge detector), so count is
// the number of transfers received. Wraps at 2**W. Synchronous active-high
// reset. One cycle from pulse to count.
`timescale 1ns / 1ps
module pulse_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         pulse,
  output logic [W-1:0] count
);

  always_ff @(posedge clk) begin
    if (rst)        count <= '0;
    else if (pulse) count <= count + 1'b1;
  end

endmodule
