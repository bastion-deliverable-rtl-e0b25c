// Testbench of the delay-line model: measures the delay of every tap after rising and
// falling edges of clk_en against the configured 20 ps per stage.
module clk_delay_line_tb;
  timeunit 1ps; timeprecision 1ps;
  logic clk_en = 0;
  logic [3:0] taps;
  clk_delay_line #(.NUM_TAPS(4), .STAGE_PS(20)) dut (.clk_en, .taps);
  int checks = 0, failures = 0;
  time t_edge;
  time t_tap [4];
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  for (genvar i = 0; i < 4; i++) begin : g_w
    always @(posedge taps[i] or negedge taps[i]) t_tap[i] = $time;
  end
  initial begin
    #500;
    for (int r = 0; r < 4; r++) begin
      clk_en = ~clk_en; t_edge = $time;
      #300;
      for (int i = 0; i < 4; i++)
        check(t_tap[i] - t_edge == 20 * i, $sformatf("tap %0d delay %0t", i, t_tap[i] - t_edge));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
