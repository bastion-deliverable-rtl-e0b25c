// End-to-end testbench of the flag network through its TAP (4 modules):
//  1. SIB access: open the SIB of module 2 and configure its CC bit;
//  2. uncorrected fault in module 2: irq rises and module 2's clock stops (internal
//     interrupt), other module clocks keep running; clearing F by scan releases both;
//  3. corrected fault: F set but no irq and no clock stop;
//  4. X mask: a fault in a masked module raises nothing;
//  5. calibration of module 2: C drops, the manager sees F&C = 00, sends the Update front
//     and counts until C returns; the count is the constant synchronizer latency, as the
//     gate paths have no delay in simulation.
// Each mechanism is counted and must have happened.
module flag_system_tb;
  import ijtag_pkg::*;
  localparam int NMOD = 4;
  logic tck = 0, trst_n = 0, tms = 1, tdi = 0, tdo, clk = 0, rst_n = 0, cal_start = 0;
  logic [NMOD-1:0] fault_in = '0, corrected_in = '0, gclk, gated;
  logic irq, cal_done, cal_busy, f_agg, c_agg;
  logic [15:0] cal_count;
  always #50 tck = ~tck;
  always #5 clk = ~clk;
  flag_system #(.NMOD(NMOD)) dut (.tck, .trst_n, .tms, .tdi, .tdo, .clk, .rst_n, .fault_in,
    .corrected_in, .gclk, .gated, .cal_start, .irq, .cal_count, .cal_done, .cal_busy, .f_agg,
    .c_agg);
  `include "jtag_drv.svh"
  int checks = 0, failures = 0;
  int n_irq = 0, n_block = 0, n_clear = 0, n_corr = 0, n_mask = 0, n_cal = 0;
  int gedges [NMOD];
  for (genvar m = 0; m < NMOD; m++) begin : g_cnt
    always @(posedge gclk[m]) gedges[m]++;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic ib [], ob [];
  localparam int M = 2, J = NMOD - 1 - M;   // module under test, bits prev_e its register
  // scan with SIB M open: write {cal, cc, x, fclr}; ob[J] is SIB M, ob[J+1+b] flag-register bit b
  task automatic cell_scan(input bit fclr, input bit x, input bit cc, input bit cal);
    ib = new[NMOD + 5];
    foreach (ib[i]) ib[i] = 0;
    ib[J] = 1; ib[J+1] = fclr; ib[J+2] = x; ib[J+3] = cc; ib[J+4] = cal;
    dr_scan(NMOD + 5, ib, ob);
  endtask
  task automatic fault(input bit corr);
    @(negedge clk) begin fault_in[M] = 1; corrected_in[M] = corr; end
    @(negedge clk) begin fault_in[M] = 0; corrected_in[M] = 0; end
    repeat (5) @(negedge clk);
  endtask
  task automatic clocks_running(output bit stopped_m, output bit others_ok);
    int prev_e [NMOD];
    prev_e = gedges;
    repeat (20) @(negedge clk);
    stopped_m = (gedges[M] == prev_e[M]);
    others_ok = 1;
    for (int m = 0; m < NMOD; m++) if (m != M && gedges[m] - prev_e[m] < 19) others_ok = 0;
  endtask
  initial begin
    bit st, ok;
    #120 trst_n = 1; rst_n = 1;
    tap_reset();
    ib = new[NMOD]; foreach (ib[i]) ib[i] = 0; ib[J] = 1;
    dr_scan(NMOD, ib, ob);
    check(ob.size() == NMOD && ob.sum() with (int'(item)) == 0, "all SIBs closed after reset");
    cell_scan(0, 0, 1, 0);
    check(ob[J] == 1 && ob[J+1] == 0 && ob[J+5] == 1, "module 2 register reached: F=0 C=1");
    // uncorrected fault
    fault(0);
    check(irq && f_agg && !c_agg, "uncorrected fault gives irq");
    if (irq) n_irq++;
    clocks_running(st, ok);
    check(st && ok && gated[M], "module 2 clock blocked, others running");
    if (st && ok) n_block++;
    cell_scan(0, 0, 1, 0);
    check(ob[J+1] == 1 && ob[J+5] == 0, "scan reads F=1 C=0");
    cell_scan(1, 0, 1, 0);
    repeat (10) @(negedge clk);
    clocks_running(st, ok);
    check(!irq && !st && ok, "F cleared by scan: irq gone, clock released");
    if (!irq && !st) n_clear++;
    // corrected fault
    fault(1);
    clocks_running(st, ok);
    check(f_agg && c_agg && !irq && !st, "corrected fault: no irq, clock runs");
    if (f_agg && !irq && !st) n_corr++;
    cell_scan(1, 1, 1, 0);
    repeat (10) @(negedge clk);
    // masked fault
    fault(0);
    check(!f_agg && c_agg && !irq, "masked module raises nothing");
    if (!f_agg && !irq) n_mask++;
    cell_scan(0, 0, 0, 1);        // unmask, enter calibration mode
    repeat (5) @(negedge clk);
    check(!f_agg && !c_agg, "calibration request: F&C = 00");
    @(negedge clk) cal_start = 1;
    fork
      begin wait (cal_done); end
      begin repeat (500) @(posedge clk); end
    join_any
    disable fork;
    check(cal_done && c_agg, "calibration finished with C back high");
    check(cal_count <= 3, $sformatf("calibration count %0d is the synchronizer latency", cal_count));
    if (cal_done) n_cal++;
    @(negedge clk) cal_start = 0;
    cell_scan(0, 0, 0, 0);
    repeat (5) @(negedge clk);
    check(c_agg && !cal_busy, "calibration mode left");
    check(n_irq > 0 && n_block > 0 && n_clear > 0 && n_corr > 0 && n_mask > 0 && n_cal > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
