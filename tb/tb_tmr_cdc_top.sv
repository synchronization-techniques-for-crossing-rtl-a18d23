// tb_tmr_cdc_top: end-to-end test of the whole design at a reduced pulse
// count. Sender clock 10 ns, receiver clock 20.137 ns (about 50 MHz,
// drifting against the sender so every sampling phase occurs), wire skew of
// 615 ps on copy C of every crossing. Three test sequences are run, as in a
// fault-injection campaign: no upset; copy B of the long-pulse crossing stuck
// at 0 and copy C of the short-pulse crossing stuck at 1; copy A of the long
// crossing stuck at 1 and copy B of the short crossing stuck at 0. After each
// sequence every receiver-side voter output must have delivered exactly as
// many one-cycle pulses as were sent. The sampling-uncertainty counter must
// match the rate (delay_max - delay_min) * f_r * (data changes per second) within 35 %.
// The sequences must also run at the crossings' maximum rates: one long
// transfer per 2*n = 6 sender cycles, one short transfer per 9. Counts of
// every mechanism are printed, and one that never happened is a failure.
`timescale 1ns / 1ps
module tb_tmr_cdc_top;
  localparam int NUM = 400;
  localparam real TSND = 10.0, TRCV = 20.137;
  int checks = 0, failures = 0;

  logic clk_s = 0, clk_r = 0, rst_s = 1, rst_r = 1, start = 0;
  logic [31:0] long_sent, long_rcvd, short_sent, short_rcvd, disagree_count;
  logic        long_done, short_done;
  logic [2:0]  long_rx, short_rx, long_rs, short_rs;

  // mechanism counters
  int n_long_rx [3], n_short_rx [3];
  int n_long_skew_events = 0, n_short_skew_events = 0;
  int n_long_seu0 = 0, n_long_seu1 = 0, n_short_seu0 = 0, n_short_seu1 = 0;
  int phase_id = 0;

  always #(TSND / 2) clk_s = ~clk_s;
  always #(TRCV / 2) clk_r = ~clk_r;

  tmr_cdc_top #(.NUM_PULSES(NUM)) dut (
    .clk_s(clk_s), .rst_s(rst_s), .clk_r(clk_r), .rst_r(rst_r), .start(start),
    .long_sent(long_sent), .long_done(long_done), .long_rcv_sig(long_rs), .long_rx_pulse(long_rx), .long_rcvd(long_rcvd),
    .short_sent(short_sent), .short_done(short_done), .short_rcv_sig(short_rs), .short_rx_pulse(short_rx), .short_rcvd(short_rcvd),
    .disagree_count(disagree_count));

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count pulses at every voter output and the raw-copy disagreements.
  always @(negedge clk_r) if (!rst_r) begin
    logic [2:0] lr, sr;
    for (int i = 0; i < 3; i++) begin
      if (long_rx[i])  n_long_rx[i]++;
      if (short_rx[i]) n_short_rx[i]++;
    end
    lr = long_rs;
    sr = short_rs;
    if (phase_id == 0) begin
      if (lr != 3'b000 && lr != 3'b111) n_long_skew_events++;
      if (sr != 3'b000 && sr != 3'b111) n_short_skew_events++;
    end
  end

  task automatic run_sequence(input string name);
    int l0 [3], s0 [3];
    realtime ts, tl, tsh;
    int cyc_l, cyc_s;
    for (int i = 0; i < 3; i++) begin l0[i] = n_long_rx[i]; s0[i] = n_short_rx[i]; end
    @(negedge clk_s) start = 1;
    ts = $realtime;
    @(negedge clk_s) start = 0;
    fork
      begin wait (long_done);  tl  = $realtime; end
      begin wait (short_done); tsh = $realtime; end
    join
    // start is raised half a cycle before the edge that samples it; the first
    // pulse follows one cycle later and done rises with the last pulse,
    // (NUM-1)*GAP cycles after the first: 1.5 + (NUM-1)*GAP cycles in all
    cyc_l = int'((tl - ts) / TSND - 1.5);
    cyc_s = int'((tsh - ts) / TSND - 1.5);
    checks += 2;
    if (cyc_l != (NUM - 1) * 6) begin failures++; $display("FAIL long rate: %0d cycles", cyc_l); end
    if (cyc_s != (NUM - 1) * 9) begin failures++; $display("FAIL short rate: %0d cycles", cyc_s); end
    repeat (12) @(negedge clk_r);
    for (int i = 0; i < 3; i++) begin
      checks += 2;
      if (n_long_rx[i] - l0[i] != NUM || long_sent != NUM) begin
        failures++;
        $display("FAIL %s: long copy %0d got %0d of %0d", name, i, n_long_rx[i] - l0[i], long_sent);
      end
      if (n_short_rx[i] - s0[i] != NUM || short_sent != NUM) begin
        failures++;
        $display("FAIL %s: short copy %0d got %0d of %0d", name, i, n_short_rx[i] - s0[i], short_sent);
      end
    end
    $display("%s: long %0d/%0d/%0d, short %0d/%0d/%0d of %0d", name,
             n_long_rx[0] - l0[0], n_long_rx[1] - l0[1], n_long_rx[2] - l0[2],
             n_short_rx[0] - s0[0], n_short_rx[1] - s0[1], n_short_rx[2] - s0[2], NUM);
  endtask

  initial begin
    realtime t0, t1;
    int d0;
    real expected, measured;
    for (int i = 0; i < 3; i++) begin n_long_rx[i] = 0; n_short_rx[i] = 0; end
    repeat (4) @(posedge clk_r);
    @(negedge clk_s) rst_s = 0;
    @(negedge clk_r) rst_r = 0;
    repeat (4) @(negedge clk_r);

    // sequence 1: no upset; also times the disagreement measurement
    t0 = $realtime; d0 = disagree_count;
    run_sequence("no upset");
    t1 = $realtime;
    expected = 0.615e-9 * (1.0e9 / TRCV) * (1.0e9 / TSND) * (t1 - t0) * 1.0e-9;
    measured = real'(disagree_count - d0);
    $display("disagreements: measured %0d, model %0.1f", disagree_count - d0, expected);
    checks++;
    if (measured < 0.65 * expected || measured > 1.35 * expected) begin
      failures++;
      $display("FAIL disagreement rate off the model");
    end

    // sequence 2: long copy B stuck at 0, short copy C stuck at 1
    phase_id = 1;
    force dut.u_long_sync.g_copy[1].u_sync.chain = 2'b00;
    force dut.u_short_sync.g_copy[2].u_sync.ff3 = 1'b1;
    n_long_seu0++; n_short_seu1++;
    run_sequence("long B stuck 0, short C stuck 1");
    release dut.u_long_sync.g_copy[1].u_sync.chain;
    release dut.u_short_sync.g_copy[2].u_sync.ff3;
    repeat (6) @(negedge clk_r);

    // sequence 3: long copy A stuck at 1, short copy B stuck at 0
    force dut.u_long_sync.g_copy[0].u_sync.chain = 2'b11;
    force dut.u_short_sync.g_copy[1].u_sync.ff3 = 1'b0;
    n_long_seu1++; n_short_seu0++;
    run_sequence("long A stuck 1, short B stuck 0");
    release dut.u_long_sync.g_copy[0].u_sync.chain;
    release dut.u_short_sync.g_copy[1].u_sync.ff3;

    $display("mechanisms: long transfers %0d, short transfers %0d, long copies apart %0d, short copies apart %0d, disagreement counts %0d, upsets long s0/s1 %0d/%0d short s0/s1 %0d/%0d",
             n_long_rx[0], n_short_rx[0], n_long_skew_events, n_short_skew_events, disagree_count,
             n_long_seu0, n_long_seu1, n_short_seu0, n_short_seu1);
    checks++;
    if (n_long_rx[0] == 0 || n_short_rx[0] == 0 || n_long_skew_events == 0 ||
        n_short_skew_events == 0 || disagree_count == 0 || n_long_seu0 == 0 ||
        n_long_seu1 == 0 || n_short_seu0 == 0 || n_short_seu1 == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
