// tmr_short_sync: triplicated short-pulse clock-domain crossing.
//
// Three copies of the modified short-pulse synchronizer (latch, three receiver
// flip-flops, latch clear from the second) each catch one copy of a sender
// pulse that may be shorter than a receiver period, and stretch it to a
// two-cycle received signal. A bank of three majority voters, one per copy,
// combines them. Because the copies can be captured on receiver edges one
// apart (sampling uncertainty), the two-cycle width guarantees an overlap of
// at least one cycle between any two copies, so a single copy stuck at 0 or 1
// cannot hide or duplicate a pulse: the voted output lasts 1 to 3 cycles
// depending on skew and on which fault is present. Latency: two receiver
// clocks from the capture edge to the voted output.
`timescale 1ns / 1ps
module tmr_short_sync
  import tmr_cdc_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic [NCOPY-1:0] snd,
  output logic [NCOPY-1:0] rcv_sig,
  output logic [NCOPY-1:0] vote
);

  for (genvar i = 0; i < NCOPY; i++) begin : g_copy
    short_pulse_sync u_sync (
      .clk       (clk),
      .rst       (rst),
      .snd       (snd[i]),
      .rcv_sig   (rcv_sig[i]),
      .latch_clr ()
    );

    tmr_voter #(.WIDTH(1)) u_voter (
      .a (rcv_sig[0]),
      .b (rcv_sig[1]),
      .c (rcv_sig[2]),
      .y (vote[i])
    );
  end

endmodule
