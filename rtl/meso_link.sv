// meso_link: a bidirectional mesochronous link between two endpoints.
//
// Endpoint A (the sender) and endpoint B (the receiver) run on clocks clk_a
// and clk_b of equal frequency and arbitrary phase. Each direction carries
// data, the transmitter's clock and its reset to a mesochronous synchronizer
// (meso_sync) that sits at the receiving end and delivers the data in the
// receiving clock domain. This two-synchronizer arrangement follows the
// source's picture of a mesochronous network; the endpoints themselves (NoC
// routers or IP cores) are outside this module and appear as ports.
//
// Interface: per direction, data and reset from the transmitting side, the
// synchronized data to the receiving side, and the frozen selection signal
// for observation (ss_ab for A->B, ss_ba for B->A). Timing: as meso_sync, in
// each direction independently.
`timescale 1ps/1ps
module meso_link #(
  parameter int unsigned DATA_W     = meso_pkg::DEFAULT_DATA_W,
  parameter int unsigned DELTA_H_PS = meso_pkg::DEFAULT_DELTA_H_PS
) (
  input  logic              clk_a,
  input  logic              rst_a_n,
  input  logic [DATA_W-1:0] data_a,
  output logic [DATA_W-1:0] data_out_a,
  input  logic              clk_b,
  input  logic              rst_b_n,
  input  logic [DATA_W-1:0] data_b,
  output logic [DATA_W-1:0] data_out_b,
  output logic              ss_ab,
  output logic              ss_ba
);
  // A -> B: transmitted clock clk_a, local clock clk_b.
  meso_sync #(.DATA_W(DATA_W), .DELTA_H_PS(DELTA_H_PS)) u_ms_ab (
    .clk_tx  (clk_a),
    .rst_n   (rst_a_n),
    .data    (data_a),
    .clk_rx  (clk_b),
    .data_out(data_out_b),
    .sw      (),
    .ss      (ss_ab)
  );

  // B -> A: transmitted clock clk_b, local clock clk_a.
  meso_sync #(.DATA_W(DATA_W), .DELTA_H_PS(DELTA_H_PS)) u_ms_ba (
    .clk_tx  (clk_b),
    .rst_n   (rst_b_n),
    .data    (data_b),
    .clk_rx  (clk_a),
    .data_out(data_out_a),
    .sw      (),
    .ss      (ss_ba)
  );
endmodule
