// tb_disagreement_detector: random three-copy samples; checks the detector
// flag against a reference and the counter against a reference count.
`timescale 1ns / 1ps
module tb_disagreement_detector;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, dis;
  logic [2:0] s = '0;
  logic [31:0] cnt;
  int unsigned ref_cnt = 0;

  always #5 clk = ~clk;

  disagreement_detector dut (.clk(clk), .rst(rst), .s(s), .disagree(dis), .count(cnt));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 400; t++) begin
      s = 3'($urandom);
      #1;
      checks++;
      if (dis !== (s != 3'b000 && s != 3'b111)) begin failures++; $display("FAIL flag s=%b", s); end
      @(posedge clk); #1;
      if (s != 3'b000 && s != 3'b111) ref_cnt++;
      checks++;
      if (cnt !== ref_cnt) begin failures++; $display("FAIL count %0d vs %0d", cnt, ref_cnt); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
