// tb_short_pulse_sync: sends one-sender-cycle pulses (10 ns, shorter than the
// 20 ns receiver period) at random phases and checks, for each pulse, that
// the received signal is exactly two receiver cycles wide, appears on the
// third receiver edge after the latch is set (two clocks after the capture
// edge), and that the latch clear is high for two cycles and gone before the
// next pulse; the number of received pulses must equal the number sent.
`timescale 1ns / 1ps
module tb_short_pulse_sync;
  localparam real TRCV = 20.0, TPW = 10.0;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, snd = 0, rcv, clr;
  int edges_since_set = -1;  // receiver edges since the last set
  int rises = 0, hi_len = 0;
  logic rcv_prev = 0;

  always #(TRCV / 2) clk = ~clk;

  short_pulse_sync dut (.clk(clk), .rst(rst), .snd(snd), .rcv_sig(rcv), .latch_clr(clr));

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge snd) edges_since_set = 0;

  always @(posedge clk) if (!rst) begin
    if (edges_since_set >= 0) edges_since_set++;
    #1;
    if (rcv && !rcv_prev) begin
      rises++;
      checks++;
      if (edges_since_set != 3) begin
        failures++;
        $display("FAIL %0t rcv rose %0d edges after the set", $realtime, edges_since_set);
      end
    end
    if (rcv) hi_len++;
    else if (rcv_prev) begin
      checks++;
      if (hi_len != 2) begin failures++; $display("FAIL %0t rcv width %0d", $realtime, hi_len); end
      hi_len = 0;
    end
    rcv_prev = rcv;
  end

  initial begin
    int n;
    n = 200;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    #1;
    checks++;
    if (clr !== 1'b0 || rcv !== 1'b0) begin failures++; $display("FAIL idle state"); end
    for (int k = 0; k < n; k++) begin
      #(0.013 + real'($urandom % 19000) / 1000.0);
      checks++;
      if (clr !== 1'b0) begin failures++; $display("FAIL clear still high at send"); end
      snd = 1;
      #(TPW) snd = 0;
      #(4 * TRCV + 1.0);
    end
    repeat (4) @(posedge clk);
    #2;
    checks++;
    if (rises != n) begin failures++; $display("FAIL %0d of %0d pulses received", rises, n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
