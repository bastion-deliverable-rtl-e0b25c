// Testbench of the slack monitor: the four sampling clocks are driven here 20 ps apart
// after a ClockEnable edge, and Data is switched at chosen times. A transition well before
// the window must leave all flip-flops equal (no warning); a transition inside the window
// must raise Warning and leave the flip-flops before it at the old value and those after it
// at the new one, for every possible position in the window.
module slack_monitor_tb;
  timeunit 1ps; timeprecision 1ps;
  logic [3:0] clk_taps = '0, q;
  logic data = 0, warning;
  slack_monitor dut (.clk_taps, .data, .q, .warning);
  int checks = 0, failures = 0, warnings = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  // one window: edges at 0, 20, 40, 60 ps; data toggles at t_data ps (may be negative)
  task automatic window(input int t_data, input logic newval);
    fork
      begin
        #1000;
        for (int i = 0; i < 4; i++) begin clk_taps[i] = 1; #20; end
        #100 clk_taps = '0;
      end
      begin #(1000 + t_data); data = newval; end
    join
    #100;
  endtask
  initial begin
    window(-500, 1'b1);
    check(q == 4'b1111 && !warning, "early transition: no warning");
    window(-300, 1'b0);
    check(q == 4'b0000 && !warning, "early falling transition: no warning");
    for (int k = 1; k < 4; k++) begin
      data = 0; window(-500, 1'b0);
      window(20 * k - 10, 1'b1);
      check(warning, $sformatf("late transition before tap %0d warns", k));
      for (int i = 0; i < 4; i++)
        check(q[i] == (i >= k), $sformatf("tap %0d value for transition before tap %0d", i, k));
      if (warning) warnings++;
    end
    window(200, 1'b0);
    check(q == 4'b1111 && !warning, "transition after window: no warning");
    check(warnings == 3, "three warnings");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
