// meso_sync: the mesochronous synchronizer (MS).
//
// Moves data from a transmitter clock domain (clk_tx) into a receiver clock
// domain (clk_rx) of the same frequency but unknown, fixed phase. Instead of a
// FIFO or a phase detector, it chooses once, after reset, which edge of the
// local clock samples the data: the rising edge if it falls inside a
// half-period "selection window" that starts ΔH after each clk_tx rising
// edge, otherwise the falling edge, which is then inside the window.
//
// Structure, as in the source's block diagram: sw_gen builds the window from
// clk_tx, ss_gen samples it with clk_rx and freezes the selection signal SS,
// data_buffer captures the data on both clk_rx edges and lets SS pick one.
// Reset comes from the transmitter along with data and clk_tx.
//
// Interface: clk_tx, rst_n (active low), data[DATA_W] from the transmitter;
// clk_rx from the receiver; data_out[DATA_W] to the receiver; sw and ss for
// observation. Timing: data may start changing on the second clk_tx rising
// edge after reset release, one word per clk_tx rising edge; each word
// appears on data_out ΔH to ΔH + T/2 after its launch edge.
`timescale 1ps/1ps
module meso_sync #(
  parameter int unsigned DATA_W     = meso_pkg::DEFAULT_DATA_W,
  parameter int unsigned DELTA_H_PS = meso_pkg::DEFAULT_DELTA_H_PS
) (
  input  logic              clk_tx,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] data,
  input  logic              clk_rx,
  output logic [DATA_W-1:0] data_out,
  output logic              sw,
  output logic              ss
);
  logic sw_armed;

  sw_gen #(.DELTA_H_PS(DELTA_H_PS)) u_sw_gen (
    .clk_tx  (clk_tx),
    .rst_n   (rst_n),
    .sw      (sw),
    .sw_armed(sw_armed)
  );

  ss_gen u_ss_gen (
    .clk_rx   (clk_rx),
    .rst_n    (rst_n),
    .sw       (sw),
    .sw_armed (sw_armed),
    .ss       (ss),
    .ss_enable()
  );

  data_buffer #(.DATA_W(DATA_W)) u_data_buffer (
    .clk_rx  (clk_rx),
    .rst_n   (rst_n),
    .data_in (data),
    .ss      (ss),
    .data_out(data_out)
  );
endmodule
