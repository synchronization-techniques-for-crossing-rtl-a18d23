// wire_skew_model: behavioural model of the three wires that carry a
// triplicated signal from one clock domain to the other.
//
// Not synthesizable logic: a simulation model. Each copy is delayed by its
// own transport delay (DELAY_A_PS, DELAY_B_PS, DELAY_C_PS, in picoseconds);
// the difference between the largest and smallest delay is the signal skew
// T_skew that the crossings must tolerate. The default puts the whole skew on
// copy C, 615 ps, the worst-case routed skew of an automatically placed
// triplicated crossing on the target FPGA. Synthesis ignores the delays and
// sees three plain wires.
`timescale 1ns / 1ps
module wire_skew_model
  import tmr_cdc_pkg::*;
#(
  parameter int unsigned DELAY_A_PS = 0,
  parameter int unsigned DELAY_B_PS = 0,
  parameter int unsigned DELAY_C_PS = 615
) (
  input  logic [NCOPY-1:0] in,
  output logic [NCOPY-1:0] out
);

  assign #(real'(DELAY_A_PS) / 1000.0) out[0] = in[0];
  assign #(real'(DELAY_B_PS) / 1000.0) out[1] = in[1];
  assign #(real'(DELAY_C_PS) / 1000.0) out[2] = in[2];

endmodule
