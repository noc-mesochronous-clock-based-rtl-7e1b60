// data_buffer: dual-edge data registers and the selecting MUX.
//
// The incoming data is captured twice: on the rising edge of clk_rx and, in a
// second register, on its falling edge (the inverted local clock). The
// selection signal picks one: ss = 1 gives the rising-edge register (MUX
// input 1), ss = 0 the falling-edge register (MUX input 0). Since SS puts the
// chosen edge at least ΔH after and half a period minus ΔH before each data
// transition, the chosen register never samples inside the metastability
// window; the other register's value is simply ignored.
//
// The two registers and the MUX mapping follow the source. The reset of the
// registers (to 0) and the data width are this design's choices.
//
// Interface: clk_rx, rst_n, data_in[DATA_W], ss in; data_out[DATA_W] out.
// Timing: data_out follows the selected register combinationally, so it
// changes on the rising edge of clk_rx (ss = 1) or on the falling edge
// (ss = 0), ΔH to ΔH + T/2 after the word was launched.
`timescale 1ps/1ps
module data_buffer #(
  parameter int unsigned DATA_W = meso_pkg::DEFAULT_DATA_W
) (
  input  logic              clk_rx,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] data_in,
  input  logic              ss,
  output logic [DATA_W-1:0] data_out
);
  logic [DATA_W-1:0] q_rise, q_fall;

  always_ff @(posedge clk_rx or negedge rst_n)
    if (!rst_n) q_rise <= '0;
    else        q_rise <= data_in;

  always_ff @(negedge clk_rx or negedge rst_n)
    if (!rst_n) q_fall <= '0;
    else        q_fall <= data_in;

  always_comb data_out = ss ? q_rise : q_fall;
endmodule
