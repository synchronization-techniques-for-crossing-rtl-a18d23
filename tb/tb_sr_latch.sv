// tb_sr_latch: set, hold, reset, hold and reset-over-set sequences on the
// set/reset latch, with short set pulses of varying width.
`timescale 1ns / 1ps
module tb_sr_latch;
  int checks = 0, failures = 0;
  logic s = 0, r = 1, q;

  sr_latch dut (.s(s), .r(r), .q(q));

  task automatic expect_q(input logic v, input string what);
    checks++;
    if (q !== v) begin failures++; $display("FAIL %s q=%b", what, q); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 expect_q(0, "reset");
    r = 0; #1 expect_q(0, "hold 0");
    for (int w = 1; w <= 5; w++) begin
      s = 1; #(w * 0.1);
      s = 0; #1 expect_q(1, "set by short pulse");
      #5 expect_q(1, "hold 1");
      r = 1; #0.2 expect_q(0, "reset");
      r = 0; #3 expect_q(0, "hold 0 after reset");
    end
    s = 1; r = 1; #1 expect_q(0, "reset wins");
    r = 0; #1 expect_q(1, "set after reset released");
    s = 0; #1 expect_q(1, "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
