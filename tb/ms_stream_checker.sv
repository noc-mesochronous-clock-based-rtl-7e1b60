// ms_stream_checker: data source and scoreboard for one synchronizer.
//
// Sits on the transmitting side of a mesochronous synchronizer. Counting
// clk_tx rising edges from reset release, it launches a fresh random word on
// every edge from the second one on (first to last word number given by
// FIRST_WORD and LAST_WORD), which is the earliest start the scheme allows.
//
// It knows the phase of the receiving clock (phase: clk_rx rising edges lie
// phase ps after clk_tx rising edges) and works out, from that alone, which
// edge the synchronizer has to use: the rising edge when it lies inside the
// window [DH, DH + T/2), else the falling edge. Within 1 ps of a window
// boundary either choice is safe and the observed one is accepted. For
// every word it then checks
//   - the observed selection signal against the expected one,
//   - that the chosen edge keeps at least T_HOLD after and T_SETUP before
//     each data transition (the metastability window is avoided),
//   - that the latency L from launch to output lies in [DH, DH + T/2),
//   - that data_out shows the word 1 ps after launch + L and still shows
//     it 2 ps before the next word is due.
`timescale 1ps/1ps
module ms_stream_checker #(
  parameter int W          = 8,
  parameter int T          = 1000,
  parameter int DH         = 200,
  parameter int T_SETUP    = 50,
  parameter int T_HOLD     = 50,
  parameter int FIRST_WORD = 2,
  parameter int LAST_WORD  = 14
) (
  input  logic         clk_tx,
  input  logic         rst_n,
  input  int           phase,
  input  logic         ss,
  input  logic [W-1:0] data_out,
  output logic [W-1:0] data
);
  int checks = 0, failures = 0, words = 0;
  int edge_no = 0;

  initial data = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %m %s at %0t (phase %0d)", what, $time, phase);
    end
  endtask

  always @(posedge clk_tx) begin
    if (!rst_n) edge_no = 0;
    else        edge_no++;
    if (rst_n && edge_no >= FIRST_WORD && edge_no <= LAST_WORD) launch();
  end

  task automatic launch();
    logic [W-1:0] v;
    bit exp_ss, boundary, sel;
    int lat;
    v        = W'($urandom);
    data    <= v;
    words++;
    exp_ss   = (phase >= DH) && (phase < DH + T/2);
    boundary = (phase - DH <= 1 && DH - phase <= 1) ||
               (phase - (DH + T/2) <= 1 && (DH + T/2) - phase <= 1);
    sel      = boundary ? ss : exp_ss;
    if (!boundary) check(ss == exp_ss, "selection signal");
    lat = sel ? phase : (phase + T/2) % T;
    check(lat >= T_HOLD && lat <= T - T_SETUP, "sampling edge outside metastability window");
    check(lat >= DH && lat <= DH + T/2, "latency within [dH, dH+T/2]");
    fork
      begin
        #(lat + 1);
        check(data_out == v, $sformatf("word after sampling edge (got %h expected %h)", data_out, v));
        #(T - 3);
        check(data_out == v, $sformatf("word held one period (got %h expected %h)", data_out, v));
      end
    join_none
  endtask
endmodule
