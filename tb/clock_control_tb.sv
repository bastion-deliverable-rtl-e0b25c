// Testbench of the Clock Control gate: the gated clock must follow clk unless CC is set
// and F=1, C=0; the gate must never cut a high phase short, whatever time the flags change.
module clock_control_tb;
  logic clk = 0, cc = 0, f = 0, c = 1, gclk, gated;
  always #5 clk = ~clk;
  clock_control dut (.clk, .cc, .f, .c, .gclk, .gated);
  int checks = 0, failures = 0, n_clk = 0, n_g = 0, short_pulses = 0;
  realtime t_rise;
  always @(posedge clk) n_clk++;
  always @(posedge gclk) begin n_g++; t_rise = $realtime; end
  always @(negedge gclk) if ($realtime > 1 && $realtime - t_rise < 4.9) short_pulses++;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic run(input bit vcc, input bit vf, input bit vc, input bit expect_run);
    #($urandom_range(0, 9)); cc = vcc; f = vf; c = vc;
    repeat (2) @(posedge clk);
    @(negedge clk) begin n_clk = 0; n_g = 0; end
    repeat (10) @(negedge clk);
    check(expect_run ? (n_g == 10 && !gated) : (n_g == 0 && gated),
      $sformatf("cc=%0b f=%0b c=%0b: %0d of %0d edges", vcc, vf, vc, n_g, n_clk));
  endtask
  initial begin
    #3;
    for (int r = 0; r < 4; r++)
      for (int i = 0; i < 8; i++) run(i[2], i[1], i[0], !(i[2] && i[1] && !i[0]));
    check(short_pulses == 0, "no shortened gated-clock pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
