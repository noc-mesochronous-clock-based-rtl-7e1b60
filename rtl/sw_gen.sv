// sw_gen: selection window (SW) generator.
//
// After reset it emits exactly one SW pulse, half a clk_tx period wide, that
// opens ΔH after a clk_tx rising edge. Data launched on that clk_tx edge is
// stable throughout the window, so a receiver clock edge that lands inside
// SW can sample it safely.
//
// How it works: clk_tx is delayed by ΔH (delay_line). Two flip-flops, one on
// the rising and one on the falling edge of the delayed clock, each go from 0
// to 1 once; their XOR is high between the first delayed rising edge and the
// delayed falling edge that follows it. That structure (two edge flops and an
// XOR behind a ΔH delay) follows the source. One change is this design's own:
// the falling-edge flop loads the rising-edge flop's output rather than a
// constant 1, so the window is the correct half period even when reset is
// released while the delayed clock is high. The rising-edge flop is also
// brought out as sw_armed, which tells the SS generator that the window has
// begun.
//
// Interface: clk_tx, rst_n (asynchronous, active low) in; sw, sw_armed out.
// Timing: sw rises DELTA_H_PS after the first clk_tx rising edge that follows
// reset release (by at least DELTA_H_PS) and falls half a period later.
`timescale 1ps/1ps
module sw_gen #(
  parameter int unsigned DELTA_H_PS = meso_pkg::DEFAULT_DELTA_H_PS
) (
  input  logic clk_tx,
  input  logic rst_n,
  output logic sw,
  output logic sw_armed
);
  logic clk_tx_delay;
  logic q_rise, q_fall;

  delay_line #(.DELTA_H_PS(DELTA_H_PS)) u_delay (
    .clk_in (clk_tx),
    .clk_out(clk_tx_delay)
  );

  always_ff @(posedge clk_tx_delay or negedge rst_n)
    if (!rst_n) q_rise <= 1'b0;
    else        q_rise <= 1'b1;

  always_ff @(negedge clk_tx_delay or negedge rst_n)
    if (!rst_n) q_fall <= 1'b0;
    else        q_fall <= q_rise;

  assign sw       = q_rise ^ q_fall;
  assign sw_armed = q_rise;

  // Once the window has closed it never reopens.
  a_single_pulse: assert property (@(posedge clk_tx_delay) disable iff (!rst_n)
                                   q_fall |-> !sw);
endmodule
