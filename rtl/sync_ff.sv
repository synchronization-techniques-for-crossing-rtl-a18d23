// sync_ff: flip-flop chain synchronizer for one asynchronous input bit.
//
// STAGES flip-flops in series clocked by the receiving clock. The first stage
// may go metastable when the input changes inside its setup/hold window; each
// further stage gives it one more clock period to resolve. With the default of
// two stages the output follows the input after one to two receiver clock
// edges (capture edge plus one). A synchronous, active-high reset clears the
// chain; the reset is this design's own addition.
`timescale 1ns / 1ps
module sync_ff #(
  parameter int unsigned STAGES = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q
);

  logic [STAGES-1:0] chain;

  always_ff @(posedge clk) begin
    if (rst) chain <= '0;
    else     chain <= (chain << 1) | STAGES'(d);
  end

  assign q = chain[STAGES-1];

endmodule
