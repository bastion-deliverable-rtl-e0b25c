// Testbench of the F/C/X flag cell, driven directly through its scan controls: reset
// state, uncorrected and corrected faults, reading F and C by scan, clearing F by writing
// 1, masking with X, the CC output, and calibration mode in which F = 0 and C follows the
// local Update.
module fcx_cell_tb;
  import ijtag_pkg::*;
  logic tck = 0, trst_n = 0, clk = 0, rst_n = 0, sel = 1, scan_in = 0, scan_out;
  logic upd_in = 0, fault_in = 0, corrected_in = 0, f_out, c_out, cc_out;
  scan_ctl_t ctl = '0;
  always #5 tck = ~tck;
  always #2 clk = ~clk;
  fcx_cell dut (.tck, .trst_n, .ctl, .sel, .si(scan_in), .so(scan_out), .upd_in, .clk, .rst_n,
    .fault_in, .corrected_in, .f_out, .c_out, .cc_out);
  `include "scan_drv.svh"
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic ib [], ob [];
  // scan in {cal, cc, x, fclr} and return the five captured bits
  task automatic access(input bit fclr, input bit x, input bit cc, input bit cal);
    capture_cycle(); ib = '{fclr, x, cc, cal, 0}; shift_bits(5, ib, ob); update_cycle();
    repeat (3) @(negedge tck);
  endtask
  task automatic fault(input bit corr);
    @(negedge clk) begin fault_in = 1; corrected_in = corr; end
    @(negedge clk) begin fault_in = 0; corrected_in = 0; end
    #1;
  endtask
  initial begin
    #12 trst_n = 1; rst_n = 1;
    check(!f_out && c_out && !cc_out, "reset: F=0 C=1 CC=0");
    fault(0);
    check(f_out && !c_out, "uncorrected fault: F=1 C=0");
    access(0, 0, 1, 0);
    check(ob[0] == 1 && ob[4] == 0, "scan reads F=1, C=0");
    check(cc_out && f_out, "CC written, F kept");
    access(1, 0, 1, 0);
    check(!f_out && c_out, "writing 1 to F clears F and restores C");
    fault(1);
    check(f_out && c_out, "corrected fault: F=1 C=1");
    access(1, 1, 0, 0);
    fault(0);
    check(!f_out && c_out && !cc_out, "masked by X: no flags");
    access(0, 0, 0, 0);
    check(ob[1] == 1 && ob[0] == 0, "X read back, fault ignored");
    access(0, 0, 0, 1);
    check(!f_out && !c_out, "calibration: F&C = 00");
    upd_in = 1; #1;
    check(c_out, "calibration: C follows the Update front");
    upd_in = 0;
    access(0, 0, 0, 0);
    check(!f_out && c_out, "calibration left: C back to 1");
    sel = 0; fault(0);
    access(1, 0, 1, 0);
    check(f_out && !cc_out, "unselected cell ignores scans");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
