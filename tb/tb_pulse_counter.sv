// tb_pulse_counter: random pulses, count compared with a reference count
// every cycle; also checks the wrap of a narrow counter.
`timescale 1ns / 1ps
module tb_pulse_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, p = 0;
  logic [31:0] cnt;
  logic [2:0]  cnt3;
  int unsigned ref_cnt = 0;

  always #5 clk = ~clk;

  pulse_counter dut (.clk(clk), .rst(rst), .pulse(p), .count(cnt));
  pulse_counter #(.W(3)) dut3 (.clk(clk), .rst(rst), .pulse(p), .count(cnt3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 300; t++) begin
      p = 1'($urandom);
      @(posedge clk); #1;
      if (p) ref_cnt++;
      checks += 2;
      if (cnt !== ref_cnt) begin failures++; $display("FAIL count %0d vs %0d", cnt, ref_cnt); end
      if (cnt3 !== 3'(ref_cnt)) begin failures++; $display("FAIL wrap count"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
