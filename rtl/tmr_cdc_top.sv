// tmr_cdc_top: triplicated (TMR) clock-domain crossings between a sender
// clock clk_s and an unrelated receiver clock clk_r, with the test fixture
// that exercises them.
//
// Three independent circuits stand side by side, sharing only the clocks and
// resets:
//  * Long-pulse channel. A pulse generator issues NUM_PULSES requests; three
//    pulse stretchers (one per copy) hold each pulse for
//    N_LONG = ceil((T_rcv + T_skew) / T_snd) sender cycles and the gap after it
//    for as long; the three copies cross on skewed wires into tmr_long_sync
//    (three two-flip-flop synchronizers plus a voter bank); edge detectors turn
//    the voted levels into one-cycle pulses, and copy A is counted.
//  * Short-pulse channel. A second generator issues one-sender-cycle pulses,
//    registered once per copy; they cross on skewed wires into tmr_short_sync
//    (three latch-based modified short-pulse synchronizers plus a voter bank);
//    edge detectors and a counter follow as above. Pulses are spaced by the
//    latch loop time.
//  * Sampling-uncertainty measurement. A triplicated register toggles every
//    TOGGLE_DIV sender cycles; the default of 1 makes it a 50 MHz square wave
//    at a 100 MHz sender clock, i.e. 10^8 changes per second. The copies
//    cross on skewed wires, each is synchronized, and a disagreement detector
//    counts the receiver cycles in which the copies differ: about
//    T_skew * f_r * (changes per second) per second.
// A transfer test passes when long_rcvd == long_sent and short_rcvd ==
// short_sent after done. The wires are a behavioural delay model; everything
// else is synthesizable. Clock periods and skew are parameters in picoseconds
// and only set the sender timing (pulse width and spacing); the real clocks
// come from outside. Resets are synchronous and active high, one per domain.
`timescale 1ns / 1ps
module tmr_cdc_top
  import tmr_cdc_pkg::*;
#(
  parameter int unsigned T_SND_PS   = 10_000,     // 100 MHz sender clock
  parameter int unsigned T_RCV_PS   = 20_000,     // 50 MHz receiver clock
  parameter int unsigned T_SKEW_PS  = 615,        // worst wire skew
  parameter int unsigned NUM_PULSES = 1_000_000,  // pulses per test sequence
  parameter int unsigned TOGGLE_DIV = 1           // d changes every TOGGLE_DIV sender cycles
) (
  input  logic             clk_s,
  input  logic             rst_s,
  input  logic             clk_r,
  input  logic             rst_r,
  input  logic             start,           // sender domain, one cycle
  // long-pulse channel
  output logic [31:0]      long_sent,
  output logic             long_done,
  output logic [NCOPY-1:0] long_rcv_sig,    // per-copy synchronized signals
  output logic [NCOPY-1:0] long_rx_pulse,   // one-cycle received pulses A/B/C
  output logic [31:0]      long_rcvd,
  // short-pulse channel
  output logic [31:0]      short_sent,
  output logic             short_done,
  output logic [NCOPY-1:0] short_rcv_sig,   // per-copy received signals
  output logic [NCOPY-1:0] short_rx_pulse,
  output logic [31:0]      short_rcvd,
  // sampling-uncertainty measurement
  output logic [31:0]      disagree_count
);

  localparam int unsigned N_LONG    = long_pulse_cycles(T_SND_PS, T_RCV_PS, T_SKEW_PS);
  localparam int unsigned GAP_LONG  = 2 * N_LONG;
  localparam int unsigned GAP_SHORT = short_pulse_gap(T_SND_PS, T_RCV_PS);

  // ---------------------------------------------------------------- long
  logic             long_req;
  logic [NCOPY-1:0] long_snd, long_wire, long_vote;

  pulse_generator #(.NUM(NUM_PULSES), .GAP(GAP_LONG)) u_gen_long (
    .clk (clk_s), .rst (rst_s), .start (start),
    .pulse (long_req), .sent (long_sent), .done (long_done)
  );

  for (genvar i = 0; i < NCOPY; i++) begin : g_long_snd
    pulse_stretcher #(.N_CYC(N_LONG)) u_stretch (
      .clk (clk_s), .rst (rst_s), .req (long_req),
      .busy (), .pulse (long_snd[i])
    );
  end

  wire_skew_model #(.DELAY_A_PS(0), .DELAY_B_PS(0), .DELAY_C_PS(T_SKEW_PS)) u_wires_long (
    .in (long_snd), .out (long_wire)
  );

  tmr_long_sync #(.STAGES(2)) u_long_sync (
    .clk (clk_r), .rst (rst_r), .snd (long_wire),
    .rcv_sig (long_rcv_sig), .vote (long_vote)
  );

  for (genvar i = 0; i < NCOPY; i++) begin : g_long_edge
    edge_detect u_edge (
      .clk (clk_r), .rst (rst_r), .d (long_vote[i]), .pulse (long_rx_pulse[i])
    );
  end

  pulse_counter #(.W(32)) u_cnt_long (
    .clk (clk_r), .rst (rst_r), .pulse (long_rx_pulse[0]), .count (long_rcvd)
  );

  // ---------------------------------------------------------------- short
  logic             short_pulse;
  logic [NCOPY-1:0] short_snd, short_wire, short_vote;

  pulse_generator #(.NUM(NUM_PULSES), .GAP(GAP_SHORT)) u_gen_short (
    .clk (clk_s), .rst (rst_s), .start (start),
    .pulse (short_pulse), .sent (short_sent), .done (short_done)
  );

  // Triplicated sender register: one flip-flop per copy drives each wire.
  always_ff @(posedge clk_s) begin
    if (rst_s) short_snd <= '0;
    else       short_snd <= {NCOPY{short_pulse}};
  end

  wire_skew_model #(.DELAY_A_PS(0), .DELAY_B_PS(0), .DELAY_C_PS(T_SKEW_PS)) u_wires_short (
    .in (short_snd), .out (short_wire)
  );

  tmr_short_sync u_short_sync (
    .clk (clk_r), .rst (rst_r), .snd (short_wire),
    .rcv_sig (short_rcv_sig), .vote (short_vote)
  );

  for (genvar i = 0; i < NCOPY; i++) begin : g_short_edge
    edge_detect u_edge (
      .clk (clk_r), .rst (rst_r), .d (short_vote[i]), .pulse (short_rx_pulse[i])
    );
  end

  pulse_counter #(.W(32)) u_cnt_short (
    .clk (clk_r), .rst (rst_r), .pulse (short_rx_pulse[0]), .count (short_rcvd)
  );

  // ---------------------------------------------------- skew measurement
  localparam int unsigned TW = $clog2(TOGGLE_DIV + 1);

  logic [TW-1:0]    tog_cnt;
  logic [NCOPY-1:0] meas_snd, meas_wire, meas_smp;

  always_ff @(posedge clk_s) begin
    if (rst_s) begin
      tog_cnt  <= '0;
      meas_snd <= '0;
    end else if (tog_cnt == TW'(TOGGLE_DIV - 1)) begin
      tog_cnt  <= '0;
      meas_snd <= ~meas_snd;
    end else begin
      tog_cnt  <= tog_cnt + 1'b1;
    end
  end

  wire_skew_model #(.DELAY_A_PS(0), .DELAY_B_PS(0), .DELAY_C_PS(T_SKEW_PS)) u_wires_meas (
    .in (meas_snd), .out (meas_wire)
  );

  for (genvar i = 0; i < NCOPY; i++) begin : g_meas_sync
    sync_ff #(.STAGES(2)) u_sync (
      .clk (clk_r), .rst (rst_r), .d (meas_wire[i]), .q (meas_smp[i])
    );
  end

  disagreement_detector #(.W(32)) u_disagree (
    .clk (clk_r), .rst (rst_r), .s (meas_smp), .disagree (), .count (disagree_count)
  );

endmodule
