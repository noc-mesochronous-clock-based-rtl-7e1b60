// meso_link_tb: end-to-end test of the bidirectional link at its default
// parameters (no parameter override on the design).
//
// Endpoint A runs on clk_a, endpoint B on clk_b, same period T, clk_b
// lagging clk_a by a phase that is swept over the whole period. Seen from
// the B->A synchronizer the lag is T minus that phase, so both directions
// cover all phases. For each phase both sides are reset, each releases its
// reset at its own random instant, and each sends random words from the
// second edge of its clock on. Two ms_stream_checker instances check
// selection, sampling margins, latency and every word in each direction.
//
// Mechanisms counted (each must occur at least once, in either direction):
// rising edge of the local clock inside the selection window (rising-edge
// register used), outside it (falling-edge register used), data transition
// within the setup region of the local rising edge, and within its hold
// region. The delay and width are the design's defaults; the 1000 ps
// period and 50 ps setup/hold are the values those defaults were chosen for.
`timescale 1ps/1ps
module meso_link_tb;
  localparam int T       = 1000;
  localparam int DH      = int'(meso_pkg::DEFAULT_DELTA_H_PS);
  localparam int W       = int'(meso_pkg::DEFAULT_DATA_W);
  localparam int T_SETUP = 50;
  localparam int T_HOLD  = 50;
  localparam int STEP    = 17;

  logic         clk_a = 1'b0, clk_b = 1'b0;
  logic         rst_a_n = 1'b1, rst_b_n = 1'b1;
  logic [W-1:0] data_a, data_b, data_out_a, data_out_b;
  logic         ss_ab, ss_ba;
  int           phase_ab = 0, phase_ba = 0;
  int           checks = 0, failures = 0, runs = 0;
  int           n_inside = 0, n_outside = 0, n_setup = 0, n_hold = 0;

  meso_link dut (
    .clk_a(clk_a), .rst_a_n(rst_a_n), .data_a(data_a), .data_out_a(data_out_a),
    .clk_b(clk_b), .rst_b_n(rst_b_n), .data_b(data_b), .data_out_b(data_out_b),
    .ss_ab(ss_ab), .ss_ba(ss_ba)
  );

  ms_stream_checker #(.W(W), .T(T), .DH(DH), .T_SETUP(T_SETUP), .T_HOLD(T_HOLD)) u_chk_ab (
    .clk_tx(clk_a), .rst_n(rst_a_n), .phase(phase_ab), .ss(ss_ab),
    .data_out(data_out_b), .data(data_a)
  );

  ms_stream_checker #(.W(W), .T(T), .DH(DH), .T_SETUP(T_SETUP), .T_HOLD(T_HOLD)) u_chk_ba (
    .clk_tx(clk_b), .rst_n(rst_b_n), .phase(phase_ba), .ss(ss_ba),
    .data_out(data_out_a), .data(data_b)
  );

  initial forever begin
    #1;
    clk_a = (($time % T) < T/2);
    clk_b = (((($time - phase_ab) % T) + T) % T) < T/2;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic count(input int ph, input logic ss);
    if (ss) n_inside++; else n_outside++;
    if (ph > T - T_SETUP) n_setup++;
    if (ph < T_HOLD)      n_hold++;
  endtask

  task automatic run_phase(input int ph);
    phase_ab = ph;
    phase_ba = (T - ph) % T;
    rst_a_n  = 1'b0;
    rst_b_n  = 1'b0;
    #(3 * T);
    fork
      begin #(1 + ($urandom % (T - 2))); rst_a_n = 1'b1; end
      begin #(1 + ($urandom % (T - 2))); rst_b_n = 1'b1; end
    join
    #(20 * T);
    runs++;
    count(phase_ab, ss_ab);
    count(phase_ba, ss_ba);
  endtask

  initial begin
    #1 begin rst_a_n = 1'b0; rst_b_n = 1'b0; end
    #(T/3);
    for (int ph = 0; ph < T; ph += STEP) run_phase(ph);
    run_phase(T - 20);
    run_phase(20);
    rst_a_n = 1'b0;
    rst_b_n = 1'b0;
    #(2 * T);
    check(n_inside  > 0, "rising edge inside the window never occurred");
    check(n_outside > 0, "rising edge outside the window never occurred");
    check(n_setup   > 0, "setup-region phase never occurred");
    check(n_hold    > 0, "hold-region phase never occurred");
    check(u_chk_ab.words == runs * 13 && u_chk_ba.words == runs * 13, "one word per clock period");
    $display("meso_link_tb: runs=%0d inside=%0d outside=%0d setup=%0d hold=%0d",
             runs, n_inside, n_outside, n_setup, n_hold);
    checks   += u_chk_ab.checks + u_chk_ba.checks;
    failures += u_chk_ab.failures + u_chk_ba.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(80 * 25 * T);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + u_chk_ab.checks + u_chk_ba.checks,
             failures + u_chk_ab.failures + u_chk_ba.failures);
    $finish;
  end
endmodule
