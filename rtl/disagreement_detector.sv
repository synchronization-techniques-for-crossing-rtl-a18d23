// disagreement_detector: measures sampling uncertainty between three copies.
//
// s holds the three receiver-domain samples of one triplicated signal.
// disagree is 0 when all three are equal and 1 otherwise (combinational), and
// count adds one for every receiver cycle in which they disagree. When the
// copies differ only by wire skew, each disagreement lasts one cycle, so
// count is the number of sampling-uncertainty events; the expected rate is
// (delay_max - delay_min) * f_r * f_d events per second. Counting cycles
// rather than separate events is this design's choice. Synchronous reset.
`timescale 1ns / 1ps
module disagreement_detector
  import tmr_cdc_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NCOPY-1:0] s,
  output logic             disagree,
  output logic [W-1:0]     count
);

  always_comb disagree = !((s == '0) || (s == '1));

  always_ff @(posedge clk) begin
    if (rst)           count <= '0;
    else if (disagree) count <= count + 1'b1;
  end

endmodule
