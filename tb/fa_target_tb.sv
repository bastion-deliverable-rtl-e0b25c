// Testbench of the full-adder target: all eight input combinations, comparing the
// combinational Sum and the registered Sum and carry with the arithmetic sum x + y + cin.
module fa_target_tb;
  logic clk = 0, cin, x, y, sum_comb, sum_q, cout_q;
  always #5 clk = ~clk;
  fa_target dut (.clk, .cin, .x, .y, .sum_comb, .sum_q, .cout_q);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    for (int v = 0; v < 8; v++) begin
      int s;
      @(negedge clk); {cin, x, y} = 3'(v);
      s = int'(cin) + int'(x) + int'(y);
      #1 check(sum_comb == s[0], "combinational sum");
      @(posedge clk); #1;
      check(sum_q == s[0] && cout_q == s[1], $sformatf("registered %0d", v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
