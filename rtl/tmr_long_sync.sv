// tmr_long_sync: triplicated long-pulse clock-domain crossing.
//
// Each of the three copies of the sent pulse goes through its own flip-flop
// synchronizer (STAGES deep, default two), and a bank of three majority voters,
// one per copy, combines the three synchronized signals. The crossing is only
// safe if the sender holds every pulse, and every gap, for at least one
// receiver period plus the worst skew between the three wires
// (T_pw >= T_rcv + T_skew): then at least one receiver edge samples all three
// copies equal, so even with one copy stuck by an upset the two healthy
// copies agree during that cycle and the voters see the pulse. The pulse
// reaches the voted outputs one to two receiver edges after it arrives
// (capture edge plus STAGES-1). The voted outputs may be several cycles wide;
// edge detectors after them give one-cycle pulses.
`timescale 1ns / 1ps
module tmr_long_sync
  import tmr_cdc_pkg::*;
#(
  parameter int unsigned STAGES = 2
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NCOPY-1:0] snd,
  output logic [NCOPY-1:0] rcv_sig,
  output logic [NCOPY-1:0] vote
);

  for (genvar i = 0; i < NCOPY; i++) begin : g_copy
    sync_ff #(.STAGES(STAGES)) u_sync (
      .clk (clk),
      .rst (rst),
      .d   (snd[i]),
      .q   (rcv_sig[i])
    );

    tmr_voter #(.WIDTH(1)) u_voter (
      .a (rcv_sig[0]),
      .b (rcv_sig[1]),
      .c (rcv_sig[2]),
      .y (vote[i])
    );
  end

endmodule
