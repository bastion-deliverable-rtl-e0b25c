// Testbench of the fault-monitor flag logic: a fault sets a sticky flag and stores its code,
// a second fault while pending keeps the first code, clear drops the flag, and a masked
// monitor records nothing.
module fault_monitor_tb;
  logic clk = 0, rst_n = 0, fault = 0, mask = 1, clear = 0, flag;
  logic [1:0] fault_code = '0, code;
  always #5 clk = ~clk;
  fault_monitor #(.CODE_W(2)) dut (.clk, .rst_n, .fault, .fault_code, .mask, .clear, .flag, .code);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic pulse(input logic [1:0] c);
    @(negedge clk) fault = 1; fault_code = c; @(negedge clk) fault = 0;
  endtask
  initial begin
    #12 rst_n = 1;
    pulse(2'd3); check(!flag, "masked monitor ignores fault");
    mask = 0;
    pulse(2'd2); check(flag && code == 2'd2, "flag and code");
    repeat (5) @(negedge clk);
    check(flag, "flag sticky");
    pulse(2'd1); check(code == 2'd2, "first code kept");
    @(negedge clk) clear = 1; @(negedge clk) clear = 0;
    check(!flag, "cleared");
    pulse(2'd1); check(flag && code == 2'd1, "new fault after clear");
    @(negedge clk) mask = 1; @(negedge clk);
    check(!flag, "mask drops flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
