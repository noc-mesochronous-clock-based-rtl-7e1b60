// meso_sync_tb: end-to-end test of one mesochronous synchronizer over all
// phases.
//
// clk_tx and clk_rx have the same period T; clk_rx lags clk_tx by a phase
// that is swept over the whole period in small steps, with the grid points
// of the four cases of interest included: rising clk_rx edge inside the
// selection window, outside it, within the setup region before a data
// transition, and within the hold region after it. For each phase the
// synchronizer is reset, released at a random instant, and fed random words
// from the second clk_tx edge on; ms_stream_checker checks selection,
// sampling margins, latency and every word. The testbench counts how often
// each case occurred and fails if one never did.
`timescale 1ps/1ps
module meso_sync_tb;
  localparam int T       = 1000;
  localparam int DH      = 200;
  localparam int W       = 8;
  localparam int T_SETUP = 50;
  localparam int T_HOLD  = 50;
  localparam int STEP    = 13;

  logic         clk_tx = 1'b0, clk_rx = 1'b0;
  logic         rst_n  = 1'b1;
  logic [W-1:0] data, data_out;
  logic         sw, ss;
  int           phase = 0;
  int           checks = 0, failures = 0;
  int           n_inside = 0, n_outside = 0, n_setup = 0, n_hold = 0, runs = 0;

  meso_sync #(.DATA_W(W), .DELTA_H_PS(DH)) dut (
    .clk_tx(clk_tx), .rst_n(rst_n), .data(data), .clk_rx(clk_rx),
    .data_out(data_out), .sw(sw), .ss(ss)
  );

  ms_stream_checker #(.W(W), .T(T), .DH(DH), .T_SETUP(T_SETUP), .T_HOLD(T_HOLD)) u_chk (
    .clk_tx(clk_tx), .rst_n(rst_n), .phase(phase), .ss(ss), .data_out(data_out), .data(data)
  );

  // clk_tx rises at multiples of T, clk_rx phase ps later
  initial forever begin
    #1;
    clk_tx = (($time % T) < T/2);
    clk_rx = (((($time - phase) % T) + T) % T) < T/2;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_phase(input int ph);
    phase = ph;
    rst_n = 1'b0;
    #(3 * T);
    #(1 + ($urandom % (T - 2)));
    rst_n = 1'b1;
    #(20 * T);
    runs++;
    if (ss) n_inside++; else n_outside++;
    if (ph > T - T_SETUP) n_setup++;
    if (ph < T_HOLD)      n_hold++;
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #(T/3);
    for (int ph = 0; ph < T; ph += STEP) run_phase(ph);
    // explicit points: setup region, hold region, both window edges
    run_phase(T - 20);
    run_phase(T - 1);
    run_phase(10);
    run_phase(DH - 3);
    run_phase(DH + 3);
    run_phase(DH + T/2 - 3);
    run_phase(DH + T/2 + 3);
    rst_n = 1'b0;
    #(2 * T);
    check(n_inside  > 0, "rising edge inside the window never occurred");
    check(n_outside > 0, "rising edge outside the window never occurred");
    check(n_setup   > 0, "setup-region phase never occurred");
    check(n_hold    > 0, "hold-region phase never occurred");
    check(u_chk.words == runs * 13, "one word per clk_tx period");
    $display("meso_sync_tb: runs=%0d inside=%0d outside=%0d setup=%0d hold=%0d words=%0d",
             runs, n_inside, n_outside, n_setup, n_hold, u_chk.words);
    checks   += u_chk.checks;
    failures += u_chk.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(100 * 25 * T);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks + u_chk.checks, failures + u_chk.failures);
    $finish;
  end
endmodule
