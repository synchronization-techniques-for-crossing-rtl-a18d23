// tb_pulse_generator: starts a short sequence and checks the number of
// pulses, their spacing of exactly GAP cycles, the sent counter and done;
// then restarts it to check that a second sequence runs the same way.
`timescale 1ns / 1ps
module tb_pulse_generator;
  localparam int NUM = 7, GAP = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, pulse, done;
  logic [31:0] sent;

  always #5 clk = ~clk;

  pulse_generator #(.NUM(NUM), .GAP(GAP)) dut (
    .clk(clk), .rst(rst), .start(start), .pulse(pulse), .sent(sent), .done(done));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_seq();
    int n, last, cyc;
    n = 0; last = -1; cyc = 0;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    while (!done && cyc < 200) begin
      @(posedge clk); #1;
      cyc++;
      if (pulse) begin
        n++;
        checks++;
        if (sent !== 32'(n)) begin failures++; $display("FAIL sent=%0d n=%0d", sent, n); end
        if (last < 0) begin
          checks++;
          if (cyc != 1) begin failures++; $display("FAIL first pulse at %0d", cyc); end
        end else begin
          checks++;
          if (cyc - last != GAP) begin failures++; $display("FAIL gap %0d", cyc - last); end
        end
        last = cyc;
      end
    end
    checks++;
    if (n != NUM) begin failures++; $display("FAIL %0d pulses", n); end
    repeat (20) begin
      @(posedge clk); #1;
      checks++;
      if (pulse || !done || sent != NUM) begin failures++; $display("FAIL after done"); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (pulse || done || sent != 0) begin failures++; $display("FAIL idle"); end
    run_seq();
    run_seq();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
