// tmr_voter: two-out-of-three majority voter.
//
// Each output bit is the majority of the three corresponding input bits, so
// a single faulty copy is masked. Purely combinational, no latency. A bank of
// three of these (one per copy) follows every triplicated synchronizer so that
// the voters themselves are triplicated. WIDTH lets one voter cover a bus; the
// synchronizers use single-bit voters.
`timescale 1ns / 1ps
module tmr_voter #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y
);

  always_comb y = (a & b) | (b & c) | (a & c);

endmodule
