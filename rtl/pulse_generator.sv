// pulse_generator: sender-domain source of a test sequence of pulses.
//
// After a one-cycle start it emits NUM single-cycle pulses, one every GAP
// sender cycles (first pulse in the cycle after start), counts them on sent,
// and raises done after the last one until the next start. GAP is chosen by
// the user of the crossing to respect its maximum transfer rate (2*n cycles
// for the long-pulse crossing, the latch loop time for the short-pulse one);
// the exact spacing is this design's choice. The receiving side compares its
// own count against sent to decide whether the crossing lost or duplicated a
// pulse. Synchronous active-high reset.
`timescale 1ns / 1ps
module pulse_generator #(
  parameter int unsigned NUM = 1_000_000,
  parameter int unsigned GAP = 6
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  output logic        pulse,
  output logic [31:0] sent,
  output logic        done
);

  localparam int unsigned GW = $clog2(GAP + 1);

  logic          running;
  logic [GW-1:0] wait_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      running  <= 1'b0;
      wait_cnt <= '0;
      pulse    <= 1'b0;
      sent     <= '0;
      done     <= 1'b0;
    end else begin
      pulse <= 1'b0;
      if (start && !running) begin
        running  <= 1'b1;
        wait_cnt <= '0;
        sent     <= '0;
        done     <= 1'b0;
      end else if (running) begin
        if (wait_cnt == '0) begin
          pulse    <= 1'b1;
          sent     <= sent + 1;
          wait_cnt <= GW'(GAP - 1);
          if (sent + 1 == 32'(NUM)) begin
            running <= 1'b0;
            done    <= 1'b1;
          end
        end else begin
          wait_cnt <= wait_cnt - 1'b1;
        end
      end
    end
  end

endmodule
