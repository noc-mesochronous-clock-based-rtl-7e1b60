// ss_gen: selection signal (SS) generator.
//
// Decides once, after reset, whether the local clock's rising edge lies
// inside the selection window. SS = 1 means it does, and the data buffer then
// uses the rising-edge register; SS = 0 selects the falling-edge register.
//
// How it works: a flip-flop with enable samples SW on every rising edge of
// clk_rx. A second flip-flop, clocked by the inverted clk_rx (that is, on the
// falling edge), closes the enable and so freezes SS. Both flops and the
// inverted clock follow the source. This design's own choice is what the
// enable flop loads: sw_armed (the window has begun) rather than a constant
// 1. The decision is therefore taken by the last clk_rx rising edge before
// the first clk_rx falling edge that comes after the window opened. That edge
// lies either inside the window (SS = 1) or in the half period before it
// (SS = 0), whatever the phase of clk_rx and whenever reset is released.
//
// Interface: clk_rx, rst_n (asynchronous, active low), sw, sw_armed in;
// ss and ss_enable out. Timing: SS is final no later than one clk_rx period
// after the window opens, i.e. before data launched on the second clk_tx
// rising edge after reset is first sampled. SW is asynchronous to clk_rx; the
// SS flop samples it once, as the scheme intends.
`timescale 1ps/1ps
module ss_gen (
  input  logic clk_rx,
  input  logic rst_n,
  input  logic sw,
  input  logic sw_armed,
  output logic ss,
  output logic ss_enable
);
  logic decided;

  always_ff @(negedge clk_rx or negedge rst_n)
    if (!rst_n) decided <= 1'b0;
    else        decided <= decided | sw_armed;

  assign ss_enable = ~decided;

  always_ff @(posedge clk_rx or negedge rst_n)
    if (!rst_n)         ss <= 1'b0;
    else if (ss_enable) ss <= sw;

  // After the decision SS must not change.
  a_ss_frozen: assert property (@(posedge clk_rx) disable iff (!rst_n)
                                !ss_enable |=> $stable(ss));
endmodule
