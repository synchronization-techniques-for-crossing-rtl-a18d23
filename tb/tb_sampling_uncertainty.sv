// tb_sampling_uncertainty: reproduces the two sampling-uncertainty
// experiments with the measurement circuit of the top level: sender clock
// 100 MHz, data toggling every sender cycle (a 50 MHz square wave, 10^8
// changes per second), receiver clocks of 50, 40, 30 and 20 MHz, and a wire
// skew of 445 ps (automatic routing) or 32 ps (hand-matched routing). Each
// receiver clock is offset by a few picoseconds so that it drifts against the
// sender and every phase is sampled. For each of the eight cases the measured
// disagreements per second must be within 10 % of the rate measured on
// hardware at the same settings (2 222 979, 1 792 931, 1 325 806, 891 496 per
// second and 160 134, 133 336, 97 331, 67 955 per second), which also equals
// the model (delay_max - delay_min) * f_r * (changes per second).
`timescale 1ns / 1ps
module tb_sampling_uncertainty;
  localparam int NCASE = 8;
  localparam int unsigned SKEW_PS [NCASE] = '{445, 448, 442, 446, 32, 33, 32, 34};
  localparam int unsigned TRCV_PS [NCASE] = '{20000, 25000, 33333, 50000, 20000, 25000, 33333, 50000};
  localparam real TRCV_NS [NCASE] = '{20.037, 25.037, 33.371, 50.037, 20.037, 25.037, 33.371, 50.037};
  localparam real HW_RATE [NCASE] = '{2222979.0, 1792931.0, 1325806.0, 891496.0,
                                      160134.0, 133336.0, 97331.0, 67955.0};
  localparam real TSND = 10.0;
  localparam real RUN_NS = 1.0e6;   // 1 ms of measurement per case

  int checks = 0, failures = 0;
  logic clk_s = 0, rst_s = 1, rst_r = 1;
  logic [NCASE-1:0] clk_r = '0;
  logic [31:0] cnt [NCASE];

  always #(TSND / 2) clk_s = ~clk_s;

  for (genvar k = 0; k < NCASE; k++) begin : g_case
    always #(TRCV_NS[k] / 2) clk_r[k] = ~clk_r[k];

    tmr_cdc_top #(.T_RCV_PS(TRCV_PS[k]), .T_SKEW_PS(SKEW_PS[k]), .NUM_PULSES(1)) dut (
      .clk_s(clk_s), .rst_s(rst_s), .clk_r(clk_r[k]), .rst_r(rst_r), .start(1'b0),
      .long_sent(), .long_done(), .long_rcv_sig(), .long_rx_pulse(), .long_rcvd(),
      .short_sent(), .short_done(), .short_rcv_sig(), .short_rx_pulse(), .short_rcvd(),
      .disagree_count(cnt[k]));
  end

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] c0 [NCASE];
    #200 rst_s = 0; rst_r = 0;
    #100;
    for (int k = 0; k < NCASE; k++) c0[k] = cnt[k];
    #(RUN_NS);
    for (int k = 0; k < NCASE; k++) begin
      real rate, model;
      rate  = real'(cnt[k] - c0[k]) / (RUN_NS * 1.0e-9);
      model = real'(SKEW_PS[k]) * 1.0e-12 * (1.0e9 / TRCV_NS[k]) * (1.0e9 / TSND);
      $display("f_r %0.1f MHz, skew %0d ps: %0.0f disagreements/s (hardware %0.0f, model %0.0f)",
               1.0e3 / TRCV_NS[k], SKEW_PS[k], rate, HW_RATE[k], model);
      checks++;
      if (rate < 0.9 * HW_RATE[k] || rate > 1.1 * HW_RATE[k]) begin
        failures++;
        $display("FAIL case %0d off the hardware rate", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
