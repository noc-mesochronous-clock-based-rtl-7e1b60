// data_buffer_tb: checks the dual-edge registers and the SS-driven MUX.
//
// clk_rx runs with period T. Random data changes once per period, a quarter
// period away from either clock edge, so each edge sees a well-defined value.
// The testbench remembers the value present at each rising and each falling
// edge and checks data_out against the one selected by ss: the last
// rising-edge value when ss = 1, the last falling-edge value when ss = 0.
// ss is switched between 1 and 0 during the run to exercise both MUX inputs.
`timescale 1ps/1ps
module data_buffer_tb;
  localparam int T = 1000;
  localparam int W = 8;

  logic         clk_rx = 1'b0;
  logic         rst_n  = 1'b1;
  logic [W-1:0] data_in = '0;
  logic         ss = 1'b0;
  logic [W-1:0] data_out;
  logic [W-1:0] at_rise, at_fall;
  int           checks = 0, failures = 0;

  data_buffer #(.DATA_W(W)) dut (.clk_rx(clk_rx), .rst_n(rst_n), .data_in(data_in),
                                 .ss(ss), .data_out(data_out));

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %h expected %h", what, $time, got, exp);
    end
  endtask

  initial begin
    #(T/8) rst_n = 1'b0;
    #(T/8);
    check(data_out, '0, "reset value");
    rst_n = 1'b1;
    at_rise = '0; at_fall = '0;
    for (int i = 0; i < 200; i++) begin
      if (i % 25 == 0) ss = ~ss;
      // t = kT + T/4: change data, then rising edge at kT + T/2
      data_in = W'($urandom);
      #(T/4);
      at_rise = data_in; clk_rx = 1'b1;
      #1 check(data_out, ss ? at_rise : at_fall, "after rising edge");
      #(T/4 - 1);
      // t = kT + 3T/4: change data, then falling edge at (k+1)T
      data_in = W'($urandom);
      #(T/4);
      at_fall = data_in; clk_rx = 1'b0;
      #1 check(data_out, ss ? at_rise : at_fall, "after falling edge");
      #(T/4 - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(400 * T);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
