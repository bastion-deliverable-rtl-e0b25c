// Testbench of the Instrument Manager. The flag network is modelled here: c_agg is the
// Update front (upd_cal) returned after a round-trip delay of D system clocks, once the
// instrument has dropped C for calibration. The calibration count must grow by exactly
// one per clock of round trip. irq must follow an uncorrected fault (F=1, C=0) only.
module instrument_manager_tb;
  logic clk = 0, rst_n = 0, f_agg = 0, c_agg, cal_start = 0;
  bit fault_unc = 0;
  logic irq, upd_cal, cal_done, cal_busy;
  logic [15:0] cal_count;
  always #5 clk = ~clk;
  instrument_manager dut (.clk, .rst_n, .f_agg, .c_agg, .cal_start, .irq, .upd_cal, .cal_count,
    .cal_done, .cal_busy);
  int checks = 0, failures = 0, dly = 0, base = -1, done_pulses = 0;
  bit cal_mode = 0;
  logic [63:0] pipe = '0;
  always @(posedge clk) begin
    pipe <= {pipe[62:0], upd_cal};
    if (cal_done) done_pulses++;
  end
  always_comb c_agg = cal_mode ? ((dly == 0) ? upd_cal : pipe[dly-1]) : !(f_agg && fault_unc);
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic calibrate(input int d, output int count);
    dly = d; cal_mode = 1;
    @(negedge clk) cal_start = 1;
    fork
      begin wait (cal_done); end
      begin repeat (200) @(posedge clk); end
    join_any
    disable fork;
    @(negedge clk) count = int'(cal_count);
    cal_start = 0;
    repeat (70) @(negedge clk);   // let the modelled path empty
    cal_mode = 0;
    check(!cal_busy && !upd_cal, "manager back to idle");
  endtask
  initial begin
    int cnt, d;
    #22 rst_n = 1;
    repeat (3) @(negedge clk);
    check(!irq, "no interrupt at rest");
    f_agg = 1; fault_unc = 1; repeat (4) @(negedge clk);
    check(irq, "uncorrected fault raises irq");
    fault_unc = 0; repeat (4) @(negedge clk);
    check(!irq, "corrected fault (F=1, C=1): no irq");
    f_agg = 0; repeat (4) @(negedge clk);
    calibrate(0, base);
    check(done_pulses == 1, "one cal_done pulse");
    for (int i = 0; i < 6; i++) begin
      d = $urandom_range(1, 40);
      calibrate(d, cnt);
      check(cnt == base + d, $sformatf("round trip %0d counted as %0d (offset %0d)", d, cnt, base));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
