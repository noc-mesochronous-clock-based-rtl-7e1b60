// delay_line_tb: checks that the ΔH delay element reproduces its input
// DELTA_H_PS later, edge for edge.
//
// The input is toggled with random high and low times (all longer than the
// delay, as for a clock). Each input edge time is recorded; the testbench
// then looks at the output 1 ps before and 1 ps after the expected delayed
// edge and expects the old and the new level respectively.
`timescale 1ps/1ps
module delay_line_tb;
  localparam int unsigned DH = 200;

  logic clk_in = 1'b0;
  logic clk_out;
  int   checks = 0, failures = 0;

  delay_line #(.DELTA_H_PS(DH)) dut (.clk_in(clk_in), .clk_out(clk_out));

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  initial begin
    #(5 * DH);
    check(clk_out, 1'b0, "settled low");
    for (int i = 0; i < 40; i++) begin
      logic lvl;
      int unsigned hold_time;
      lvl       = ~clk_in;
      hold_time = DH + 10 + ($urandom % 600);
      clk_in    = lvl;
      #(DH - 1) check(clk_out, ~lvl, "before delayed edge");
      #2        check(clk_out, lvl,  "after delayed edge");
      #(hold_time - DH - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
