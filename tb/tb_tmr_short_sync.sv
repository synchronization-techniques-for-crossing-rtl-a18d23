// tb_tmr_short_sync: sends triplicated short pulses (one 10 ns sender cycle,
// receiver period 20 ns) with wire skew at random phases, with no fault and
// with each copy in turn stuck at 0 or at 1 after its synchronizer (an
// upset). Checks for every voter output: exactly one pulse per pulse sent,
// a width of 2 cycles without a fault, 1..2 cycles with a copy stuck at 0
// and 2..3 cycles with a copy stuck at 1, and a latency between two and
// three receiver periods (plus skew) from the sender pulse. Counts how often
// the healthy copies were captured one cycle apart, and how often each
// output width occurred; each expected case must have happened.
`timescale 1ns / 1ps
module tb_tmr_short_sync;
  localparam real TRCV = 20.0, TPW = 10.0, SKEW = 3.0;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic [2:0] snd = '0, rcv_sig, vote, vote_prev = '0;
  int  rises [3];
  int  width [3];
  int  width_seen [4];      // index = width in cycles (1..3)
  int  offset_events = 0;   // cycles in which the received copies differ
  int  stuck_copy = -1;
  logic stuck_val = 0;
  realtime t_send = 0;
  bit  settle = 0;

  always #(TRCV / 2) clk = ~clk;

  tmr_short_sync dut (.clk(clk), .rst(rst), .snd(snd), .rcv_sig(rcv_sig), .vote(vote));

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (!rst && !settle) begin
    logic [2:0] healthy;
    healthy = rcv_sig;
    if (stuck_copy >= 0) healthy[stuck_copy] = 1'b0;
    if (stuck_copy < 0 ? (rcv_sig != 3'b000 && rcv_sig != 3'b111)
                       : (healthy != 3'b000 && $countones(healthy) == 1)) offset_events++;
    for (int i = 0; i < 3; i++) begin
      if (vote[i] && !vote_prev[i]) begin
        realtime lat;
        rises[i]++;
        width[i] = 0;
        // the rise happened at the posedge half a period ago
        lat = $realtime - TRCV / 2 - t_send;
        checks++;
        if (lat <= 2 * TRCV || lat > 3 * TRCV + SKEW) begin
          failures++;
          $display("FAIL copy %0d latency %0.3f ns", i, lat);
        end
      end
      if (vote[i]) width[i]++;
      else if (vote_prev[i]) begin
        int lo, hi;
        lo = (stuck_copy < 0) ? 2 : (stuck_val ? 2 : 1);
        hi = (stuck_copy < 0) ? 2 : (stuck_val ? 3 : 2);
        checks++;
        if (width[i] < lo || width[i] > hi) begin
          failures++;
          $display("FAIL copy %0d width %0d (stuck %0d/%b)", i, width[i], stuck_copy, stuck_val);
        end
        if (i == 0 && width[i] >= 1 && width[i] <= 3) width_seen[width[i]]++;
      end
    end
    vote_prev <= vote;
  end

  task automatic send(input real skew_b, input real skew_c);
    #(0.013 + real'($urandom % 19000) / 1000.0);
    t_send = $realtime;
    snd[0] = 1;
    #(skew_b) snd[1] = 1;
    #(skew_c - skew_b) snd[2] = 1;
    #(TPW - skew_c) snd[0] = 0;
    #(skew_b) snd[1] = 0;
    #(skew_c - skew_b) snd[2] = 0;
    #(4 * TRCV + 1.0);
  endtask

  task automatic phase(input int n, input int copy, input logic val);
    int base [3];
    @(negedge clk);
    stuck_copy = copy; stuck_val = val;
    if (copy == 0) force dut.g_copy[0].u_sync.ff3 = val;
    if (copy == 1) force dut.g_copy[1].u_sync.ff3 = val;
    if (copy == 2) force dut.g_copy[2].u_sync.ff3 = val;
    settle = 1;
    repeat (2) @(negedge clk);
    settle = 0;
    vote_prev = vote;
    for (int i = 0; i < 3; i++) base[i] = rises[i];
    for (int k = 0; k < n; k++) send(SKEW / 2.0, SKEW);
    repeat (4) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (rises[i] - base[i] != n) begin
        failures++;
        $display("FAIL copy %0d, stuck %0d/%b: %0d of %0d pulses", i, copy, val, rises[i] - base[i], n);
      end
    end
    release dut.g_copy[0].u_sync.ff3;
    release dut.g_copy[1].u_sync.ff3;
    release dut.g_copy[2].u_sync.ff3;
    settle = 1;
    stuck_copy = -1;
    repeat (3) @(negedge clk);
    settle = 0;
    vote_prev = vote;
  endtask

  initial begin
    for (int i = 0; i < 3; i++) begin rises[i] = 0; width[i] = 0; end
    for (int i = 0; i < 4; i++) width_seen[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    phase(150, -1, 0);
    for (int c = 0; c < 3; c++) begin
      phase(150, c, 1'b0);
      phase(150, c, 1'b1);
    end
    $display("copies one cycle apart: %0d cycles; output widths 1/2/3: %0d/%0d/%0d",
             offset_events, width_seen[1], width_seen[2], width_seen[3]);
    checks++;
    if (offset_events == 0 || width_seen[1] == 0 || width_seen[2] == 0 || width_seen[3] == 0) begin
      failures++;
      $display("FAIL not every sampling case occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
