// tb_pulse_stretcher: issues requests as soon as the stretcher is idle and
// checks that every pulse is exactly N_CYC cycles high, followed by N_CYC
// low cycles, i.e. one transfer every 2*N_CYC cycles, for N_CYC = 3 and 5.
`timescale 1ns / 1ps
module tb_pulse_stretcher;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1;
  logic req3 = 0, req5 = 0, busy3, busy5, p3, p5;

  always #5 clk = ~clk;

  pulse_stretcher dut3 (.clk(clk), .rst(rst), .req(req3), .busy(busy3), .pulse(p3));
  pulse_stretcher #(.N_CYC(5)) dut5 (.clk(clk), .rst(rst), .req(req5), .busy(busy5), .pulse(p5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Record the waveform of one output and check high/low run lengths.
  task automatic run(input int n, input bit which);
    int hi, lo, period, starts;
    int last_start;
    int cyc;
    hi = 0; lo = 0; starts = 0; last_start = -1; cyc = 0;
    for (int t = 0; t < 60; t++) begin
      // request whenever idle
      if (which) req5 = !busy5; else req3 = !busy3;
      @(posedge clk); #1;
      cyc++;
      if (which) req5 = 0; else req3 = 0;
      if ((which ? p5 : p3) === 1'b1) begin
        if (hi == 0) begin
          if (last_start >= 0) begin
            period = cyc - last_start;
            checks++;
            if (period != 2 * n) begin failures++; $display("FAIL N=%0d period %0d", n, period); end
            checks++;
            if (lo != n) begin failures++; $display("FAIL N=%0d low run %0d", n, lo); end
          end
          last_start = cyc;
          starts++;
        end
        hi++; lo = 0;
      end else begin
        if (hi != 0) begin
          checks++;
          if (hi != n) begin failures++; $display("FAIL N=%0d high run %0d", n, hi); end
        end
        hi = 0; lo++;
      end
    end
    checks++;
    if (starts < 4) begin failures++; $display("FAIL N=%0d only %0d pulses", n, starts); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (p3 !== 0 || busy3 !== 0) begin failures++; $display("FAIL idle after reset"); end
    run(3, 0);
    run(5, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
