// tb_tmr_cdc_top_full: one complete test sequence of the whole design at its
// default parameters: one million pulses through each crossing, 100 MHz
// sender clock, receiver clock of 20.137 ns (about 50 MHz, drifting against
// the sender), 615 ps of wire skew. Like one run of a fault-injection
// campaign, one copy of each crossing carries an upset for the whole run
// (long-pulse copy B stuck at 0, short-pulse copy C stuck at 1). Every voter
// output must deliver exactly one million one-cycle pulses, and the
// sampling-uncertainty counter must be within 10 % of the model rate
// (delay_max - delay_min) * f_r * (data changes per second) over the run.
`timescale 1ns / 1ps
module tb_tmr_cdc_top_full;
  localparam int NUM = 1_000_000;
  localparam real TSND = 10.0, TRCV = 20.137;
  int checks = 0, failures = 0;

  logic clk_s = 0, clk_r = 0, rst_s = 1, rst_r = 1, start = 0;
  logic [31:0] long_sent, long_rcvd, short_sent, short_rcvd, disagree_count;
  logic        long_done, short_done;
  logic [2:0]  long_rx, short_rx, long_rs, short_rs;
  int n_long_rx [3], n_short_rx [3];

  always #(TSND / 2) clk_s = ~clk_s;
  always #(TRCV / 2) clk_r = ~clk_r;

  tmr_cdc_top dut (
    .clk_s(clk_s), .rst_s(rst_s), .clk_r(clk_r), .rst_r(rst_r), .start(start),
    .long_sent(long_sent), .long_done(long_done), .long_rcv_sig(long_rs), .long_rx_pulse(long_rx), .long_rcvd(long_rcvd),
    .short_sent(short_sent), .short_done(short_done), .short_rcv_sig(short_rs), .short_rx_pulse(short_rx), .short_rcvd(short_rcvd),
    .disagree_count(disagree_count));

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk_r) if (!rst_r)
    for (int i = 0; i < 3; i++) begin
      if (long_rx[i])  n_long_rx[i]++;
      if (short_rx[i]) n_short_rx[i]++;
    end

  initial begin
    realtime t0;
    real expected;
    for (int i = 0; i < 3; i++) begin n_long_rx[i] = 0; n_short_rx[i] = 0; end
    repeat (4) @(posedge clk_r);
    @(negedge clk_s) rst_s = 0;
    @(negedge clk_r) rst_r = 0;
    repeat (4) @(negedge clk_r);
    force dut.u_long_sync.g_copy[1].u_sync.chain = 2'b00;
    force dut.u_short_sync.g_copy[2].u_sync.ff3 = 1'b1;
    t0 = $realtime;
    @(negedge clk_s) start = 1;
    @(negedge clk_s) start = 0;
    wait (long_done && short_done);
    repeat (12) @(negedge clk_r);
    for (int i = 0; i < 3; i++) begin
      checks += 2;
      if (n_long_rx[i] != NUM) begin failures++; $display("FAIL long copy %0d: %0d", i, n_long_rx[i]); end
      if (n_short_rx[i] != NUM) begin failures++; $display("FAIL short copy %0d: %0d", i, n_short_rx[i]); end
    end
    checks += 2;
    if (long_sent != NUM || long_rcvd != NUM) begin failures++; $display("FAIL long counters %0d/%0d", long_sent, long_rcvd); end
    if (short_sent != NUM || short_rcvd != NUM) begin failures++; $display("FAIL short counters %0d/%0d", short_sent, short_rcvd); end
    expected = 0.615e-9 * (1.0e9 / TRCV) * (1.0e9 / TSND) * ($realtime - t0) * 1.0e-9;
    $display("long %0d/%0d, short %0d/%0d, disagreements %0d (model %0.1f), %0.3f ms simulated",
             long_rcvd, long_sent, short_rcvd, short_sent, disagree_count, expected, ($realtime - t0) / 1.0e6);
    checks++;
    if (real'(disagree_count) < 0.9 * expected || real'(disagree_count) > 1.1 * expected) begin
      failures++;
      $display("FAIL disagreement rate off the model");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
