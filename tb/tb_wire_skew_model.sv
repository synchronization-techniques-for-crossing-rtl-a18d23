// tb_wire_skew_model: toggles the three inputs and checks that each output
// changes exactly after its own transport delay (old value just before,
// new value just after), for the default delays and for a custom set.
`timescale 1ns / 1ps
module tb_wire_skew_model;
  int checks = 0, failures = 0;
  logic [2:0] in = '0, out_d, out_c;

  wire_skew_model dut_d (.in(in), .out(out_d));
  wire_skew_model #(.DELAY_A_PS(1000), .DELAY_B_PS(2500), .DELAY_C_PS(300)) dut_c (.in(in), .out(out_c));

  task automatic chk(input logic v, input logic exp, input string what);
    checks++;
    if (v !== exp) begin failures++; $display("FAIL %s at %0t", what, $realtime); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    for (int k = 0; k < 4; k++) begin
      logic v;
      v = ~in[0];
      in = {3{v}};
      #0.1;    // t = 0.1 ns
      chk(out_d[0], v, "default A at 0.1");
      chk(out_d[2], ~v, "default C before 0.615");
      chk(out_c[2], ~v, "custom C before 0.3");
      #0.25;   // t = 0.35
      chk(out_c[2], v, "custom C after 0.3");
      #0.3;    // t = 0.65
      chk(out_d[2], v, "default C after 0.615");
      chk(out_c[0], ~v, "custom A before 1.0");
      #0.4;    // t = 1.05
      chk(out_c[0], v, "custom A after 1.0");
      chk(out_c[1], ~v, "custom B before 2.5");
      #1.5;    // t = 2.55
      chk(out_c[1], v, "custom B after 2.5");
      #10;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
