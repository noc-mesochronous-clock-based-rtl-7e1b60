// ss_gen_tb: checks the decision and freezing of the selection signal.
//
// The testbench drives SW and sw_armed itself: a half-period window opens at
// time s and sw_armed rises with it. clk_rx runs with period T at a phase
// chosen per run. The expected decision comes from the clock alone: with
// r the first clk_rx rising edge at or after s, SS must be 1 exactly when
// r - s < T/2, i.e. when a rising edge lies inside the window. After the
// decision the testbench sends further spurious SW pulses and checks that SS
// no longer moves and that ss_enable has dropped.
`timescale 1ps/1ps
module ss_gen_tb;
  localparam int T = 1000;

  logic clk_rx   = 1'b0;
  logic rst_n    = 1'b0;
  logic sw       = 1'b0;
  logic sw_armed = 1'b0;
  logic ss, ss_enable;
  int   phase;
  int   checks = 0, failures = 0;
  int   n_in = 0, n_out = 0;

  ss_gen dut (.clk_rx(clk_rx), .rst_n(rst_n), .sw(sw), .sw_armed(sw_armed),
              .ss(ss), .ss_enable(ss_enable));

  // clk_rx rising edges at phase + kT
  initial begin
    forever begin
      #1;
      if ((($time - phase) % T) == 0)         clk_rx = 1'b1;
      else if ((($time - phase) % T) == T/2)  clk_rx = 1'b0;
    end
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t (phase %0d): got %b expected %b", what, $time, phase, got, exp);
    end
  endtask

  task automatic wait_until(input longint t);
    if (t > $time) #(t - $time);
  endtask

  initial begin
    phase = 0;
    for (int run = 0; run < 80; run++) begin
      longint s, r;
      logic exp_ss, final_ss;
      rst_n = 1'b0; sw = 1'b0; sw_armed = 1'b0;
      phase = (run * 53 + 11) % T;
      #(3 * T);
      rst_n = 1'b1;
      #(T + ($urandom % T));
      s = $time;
      check(ss_enable, 1'b1, "enabled before window");
      sw = 1'b1; sw_armed = 1'b1;
      r = s;
      while (((r - phase) % T) != 0) r++;
      exp_ss = ((r - s) < T/2);
      if (exp_ss) n_in++; else n_out++;
      #(T/2) sw = 1'b0;
      wait_until(s + 2 * T);
      check(ss, exp_ss, "decision");
      check(ss_enable, 1'b0, "enable closed");
      final_ss = ss;
      // spurious windows must not change the frozen decision
      for (int k = 0; k < 3; k++) begin
        #(T/3) sw = 1'b1;
        #(T/2) sw = 1'b0;
        #(T/3);
        check(ss, final_ss, "frozen");
      end
    end
    checks++;
    if (n_in == 0 || n_out == 0) begin
      failures++;
      $display("FAIL both decisions not exercised: in=%0d out=%0d", n_in, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(80 * 16 * T);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
