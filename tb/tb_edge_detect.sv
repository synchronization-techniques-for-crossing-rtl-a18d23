// tb_edge_detect: random levels in, checks one pulse per rising edge and
// nothing else, against a reference that remembers the previous level.
`timescale 1ns / 1ps
module tb_edge_detect;
  int checks = 0, failures = 0, edges = 0;
  logic clk = 0, rst = 1, d = 0, pulse, prev;

  always #5 clk = ~clk;

  edge_detect dut (.clk(clk), .rst(rst), .d(d), .pulse(pulse));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 400; t++) begin
      // Hold levels for 1..4 cycles so that long pulses occur.
      d = 1'($urandom);
      repeat (1 + ($urandom % 4)) begin
        #1;
        checks++;
        if (pulse !== (d && !prev)) begin failures++; $display("FAIL t=%0d", t); end
        if (pulse) edges++;
        @(posedge clk);
        prev = d;
        #1;
      end
    end
    checks++;
    if (edges < 50) begin failures++; $display("FAIL too few edges %0d", edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
