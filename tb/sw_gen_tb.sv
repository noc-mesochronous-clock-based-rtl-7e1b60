// sw_gen_tb: checks the selection window pulse of the SW generator.
//
// clk_tx runs with period T (rising edges at T/2 + kT). For many reset
// release instants spread over the clock period, the testbench works out
// from the clock alone when the window must open: ΔH after the first clk_tx
// rising edge whose delayed copy comes after the release. It then checks
// that sw is low just before that instant, high just after it, still high
// just before T/2 later, low after that and for several further periods
// (single pulse), and that sw_armed rises with the window and stays high.
`timescale 1ps/1ps
module sw_gen_tb;
  localparam int T  = 1000;
  localparam int DH = 200;

  logic clk_tx = 1'b0;
  logic rst_n  = 1'b0;
  logic sw, sw_armed;
  int   checks = 0, failures = 0;

  sw_gen #(.DELTA_H_PS(DH)) dut (.clk_tx(clk_tx), .rst_n(rst_n), .sw(sw), .sw_armed(sw_armed));

  always #(T/2) clk_tx = ~clk_tx;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  task automatic wait_until(input longint t);
    if (t > $time) #(t - $time);
  endtask

  initial begin
    for (int run = 0; run < 60; run++) begin
      longint t_r, t_c, s;
      rst_n = 1'b0;
      #(3 * T);
      // release at an arbitrary offset inside the period
      t_r = $time + (run * 37 + 3) % T;
      wait_until(t_r);
      rst_n = 1'b1;
      // clk_tx rising edges are at T/2 + kT; find the first one whose delayed
      // copy lies after the release
      t_c = ((t_r - DH - T/2) / T) * T + T/2;
      while (t_c + DH <= t_r) t_c += T;
      s = t_c + DH;
      check(sw, 1'b0, "low after reset release");
      wait_until(s - 2);
      check(sw, 1'b0, "low before window");
      check(sw_armed, 1'b0, "not armed before window");
      wait_until(s + 2);
      check(sw, 1'b1, "high at window start");
      check(sw_armed, 1'b1, "armed at window start");
      wait_until(s + T/2 - 2);
      check(sw, 1'b1, "high until half period");
      wait_until(s + T/2 + 2);
      check(sw, 1'b0, "low after half period");
      for (int k = 1; k <= 4; k++) begin
        wait_until(s + k * T + T/4);
        check(sw, 1'b0, "no second pulse");
        check(sw_armed, 1'b1, "stays armed");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(60 * 20 * T);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
