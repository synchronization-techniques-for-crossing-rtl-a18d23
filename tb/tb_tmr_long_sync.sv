// tb_tmr_long_sync: drives the three copies of long pulses with wire skew at
// random phases against an asynchronous receiver clock, optionally with one
// copy stuck at 0 or 1 (an upset), and compares every receiver cycle with a
// cycle-exact reference model of three two-flip-flop synchronizers and
// majority voters. With pulses obeying T_pw >= T_rcv + T_skew it also checks
// that every voter output produces exactly one rising edge per pulse. A final
// phase violates that rule to show how sampling uncertainty then combines
// with an upset (reported, and still compared with the model).
`timescale 1ns / 1ps
module tb_tmr_long_sync;
  localparam real TRCV = 20.0;
  int checks = 0, failures = 0;
  int disagree_events = 0;
  logic clk = 0, rst = 1;
  logic [2:0] snd = '0, rcv_sig, vote;

  // reference model
  logic [2:0] m1 = '0, m2 = '0;
  int  stuck_copy = -1;   // -1: no fault
  logic stuck_val = 0;
  logic [2:0] rcv_m, vote_m;
  logic [2:0] vote_prev = '0;
  int  rises [3];
  bit  settle = 0;

  always #(TRCV / 2) clk = ~clk;

  tmr_long_sync dut (.clk(clk), .rst(rst), .snd(snd), .rcv_sig(rcv_sig), .vote(vote));

  always_comb begin
    rcv_m = m2;
    if (stuck_copy >= 0) rcv_m[stuck_copy] = stuck_val;
    for (int i = 0; i < 3; i++)
      vote_m[i] = (rcv_m[0] & rcv_m[1]) | (rcv_m[1] & rcv_m[2]) | (rcv_m[0] & rcv_m[2]);
  end

  always @(posedge clk) begin
    if (rst) begin m1 <= '0; m2 <= '0; end
    else begin m1 <= snd; m2 <= m1; end
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (!settle && (vote !== vote_m || rcv_sig !== rcv_m)) begin
      failures++;
      $display("FAIL %0t vote=%b model=%b rcv=%b model=%b", $realtime, vote, vote_m, rcv_sig, rcv_m);
    end
    if (m2 != 3'b000 && m2 != 3'b111) disagree_events++;
    for (int i = 0; i < 3; i++) if (vote[i] && !vote_prev[i]) rises[i]++;
    vote_prev <= vote;
  end

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One pulse: copy k rises at t0 + skew[k] and falls tpw later.
  task automatic send(input real skew_b, input real skew_c, input real tpw, input real tgap);
    real ph;
    ph = 0.013 + real'($urandom % 19000) / 1000.0;
    #(ph);
    snd[0] = 1;
    #(skew_b) snd[1] = 1;
    #(skew_c - skew_b) snd[2] = 1;
    #(tpw - skew_c) snd[0] = 0;
    #(skew_b) snd[1] = 0;
    #(skew_c - skew_b) snd[2] = 0;
    #(tgap);
  endtask

  task automatic phase(input int n, input int copy, input logic val,
                       input real skew, input real tpw, input bit strict);
    int base [3];
    @(negedge clk);
    stuck_copy = copy; stuck_val = val;
    if (copy == 0) force dut.g_copy[0].u_sync.chain = {2{val}};
    if (copy == 1) force dut.g_copy[1].u_sync.chain = {2{val}};
    if (copy == 2) force dut.g_copy[2].u_sync.chain = {2{val}};
    repeat (3) @(negedge clk);
    for (int i = 0; i < 3; i++) base[i] = rises[i];
    for (int k = 0; k < n; k++) send(skew / 2.0, skew, tpw, tpw);
    repeat (4) @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      if (strict) begin
        checks++;
        if (rises[i] - base[i] != n) begin
          failures++;
          $display("FAIL copy %0d stuck=%0d/%b: %0d of %0d pulses", i, copy, val, rises[i] - base[i], n);
        end
      end else if (i == 0)
        $display("rule violated, copy %0d stuck at %b: %0d of %0d pulses seen", copy, val, rises[i] - base[i], n);
    end
    release dut.g_copy[0].u_sync.chain;
    release dut.g_copy[1].u_sync.chain;
    release dut.g_copy[2].u_sync.chain;
    // what a released flip-flop holds until it is next clocked depends on
    // the simulator, so comparison pauses for two cycles
    settle = 1;
    stuck_copy = -1;
    repeat (2) @(negedge clk);
    settle = 0;
    // let the released copy resynchronise to the idle level
    repeat (4) @(negedge clk);
  endtask

  initial begin
    for (int i = 0; i < 3; i++) rises[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // T_pw = T_rcv + T_skew + margin, 0.615 ns and 3 ns of skew
    phase(100, -1, 0, 0.615, TRCV + 0.615 + 0.5, 1);
    phase(100, -1, 0, 3.0, TRCV + 3.0 + 0.5, 1);
    for (int c = 0; c < 3; c++) begin
      phase(60, c, 1'b0, 3.0, TRCV + 3.0 + 0.5, 1);
      phase(60, c, 1'b1, 3.0, TRCV + 3.0 + 0.5, 1);
    end
    // rule violated: pulse only T_rcv wide with 3 ns skew, copy A stuck at 0
    phase(100, 0, 1'b0, 3.0, TRCV, 0);
    checks++;
    if (disagree_events == 0) begin failures++; $display("FAIL no sampling disagreement seen"); end
    $display("sampling disagreements between copies: %0d", disagree_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
