// tb_sync_ff: drives random data synchronously and checks that the
// synchronizer output equals the input delayed by exactly STAGES clocks,
// for the default two stages and for three.
`timescale 1ns / 1ps
module tb_sync_ff;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, d = 0, q2, q3;
  logic [7:0] hist;  // hist[k] = d as sampled k+1 edges ago

  always #5 clk = ~clk;

  sync_ff dut2 (.clk(clk), .rst(rst), .d(d), .q(q2));
  sync_ff #(.STAGES(3)) dut3 (.clk(clk), .rst(rst), .d(d), .q(q3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    checks++;
    if (q2 !== 1'b0 || q3 !== 1'b0) begin failures++; $display("FAIL reset"); end
    for (int t = 0; t < 300; t++) begin
      @(posedge clk);
      hist = {hist[6:0], d};
      #1;
      if (t >= 3) begin
        checks += 2;
        if (q2 !== hist[1]) begin failures++; $display("FAIL q2 t=%0d", t); end
        if (q3 !== hist[2]) begin failures++; $display("FAIL q3 t=%0d", t); end
      end
      d = 1'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
