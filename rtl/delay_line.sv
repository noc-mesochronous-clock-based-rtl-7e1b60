// delay_line: behavioural model of the ΔH clock delay element.
//
// This is a behavioural model, not synthesizable logic: in silicon the delay
// is a chain of buffers sized from measured setup/hold times of the
// process. It delays the transmitted clock by DELTA_H_PS picoseconds so that
// the selection window built from it starts ΔH after each clk_tx rising edge,
// past the hold region of data launched on that edge.
//
// Interface: clk_in -> clk_out, pure delay, both edges delayed equally.
// Timing: clk_out(t) = clk_in(t - DELTA_H_PS). Pulses narrower than the delay
// are swallowed (inertial continuous assignment); the clock's half period must
// therefore exceed DELTA_H_PS, which the design rules already demand.
// The delay value is this design's choice; the source gives no number.
`timescale 1ps/1ps
module delay_line #(
  parameter int unsigned DELTA_H_PS = meso_pkg::DEFAULT_DELTA_H_PS
) (
  input  logic clk_in,
  output logic clk_out
);
  assign #(DELTA_H_PS) clk_out = clk_in;
endmodule
