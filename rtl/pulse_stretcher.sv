// pulse_stretcher: sender side of the long-pulse crossing.
//
// A one-cycle request starts a transfer: the output is held high for N_CYC
// sender cycles and then low for N_CYC cycles, so both the pulse and the gap
// after it satisfy T >= T_rcv + T_skew when N_CYC = ceil((T_rcv+T_skew)/T_snd).
// That gives the long-pulse crossing its maximum rate of one transfer every
// 2*N_CYC sender cycles. busy is high for the whole 2*N_CYC window and a
// request arriving while busy is dropped (the caller must wait for !busy);
// this request/busy handshake is this design's choice. The pulse is driven
// straight from a flip-flop so that it is glitch-free on the crossing wire.
// In a triplicated design each copy has its own stretcher.
`timescale 1ns / 1ps
module pulse_stretcher #(
  parameter int unsigned N_CYC = 3
) (
  input  logic clk,
  input  logic rst,
  input  logic req,
  output logic busy,
  output logic pulse
);

  localparam int unsigned CW = $clog2(2 * N_CYC + 1);

  logic [CW-1:0] remaining;  // cycles left in the current transfer window

  always_ff @(posedge clk) begin
    if (rst) begin
      remaining <= '0;
      pulse     <= 1'b0;
    end else if (remaining == '0) begin
      if (req) begin
        remaining <= CW'(2 * N_CYC - 1);
        pulse     <= 1'b1;
      end
    end else begin
      remaining <= remaining - 1'b1;
      pulse     <= (remaining > CW'(N_CYC));
    end
  end

  assign busy = (remaining != '0) || pulse;

  // A request is only legal when the stretcher is idle.
  a_req_idle : assert property (@(posedge clk) disable iff (rst) req |-> !busy)
    else $error("pulse_stretcher: request while busy");

endmodule
