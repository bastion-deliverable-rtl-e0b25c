// Testbench of the modified SIB: besides regular SIB behaviour, 'open' must set the SIB
// without any TCK edge while unselected and show on toopen, be ignored while selected,
// keep the SIB open after 'open' drops, and a zero updated through the scan must close it.
module msib_tb;
  import ijtag_pkg::*;
  logic tck = 0, trst_n = 0, sel = 0, scan_in = 0, scan_out, tsi, fso, seg_sel, is_open;
  logic open = 0, toopen;
  bit run_clk = 1;
  scan_ctl_t ctl = '0;
  logic [1:0] seg = '0;
  always #5 if (run_clk) tck = ~tck;
  msib dut (.tck, .trst_n, .ctl, .sel, .si(scan_in), .so(scan_out), .tsi, .fso, .seg_sel,
            .is_open, .open, .toopen);
  always @(posedge tck) if (seg_sel && ctl.shift) seg <= {tsi, seg[1]};
  assign fso = seg[0];
  `include "scan_drv.svh"
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic ib [], ob [];
  initial begin
    #12 trst_n = 1;
    @(negedge tck) ctl.reset = 1; @(negedge tck) ctl = '0;
    check(!is_open, "reset closed");
    // asynchronous open with the clock stopped
    run_clk = 0; #20;
    open = 1; #1;
    check(is_open && toopen, "opened without TCK, request forwarded");
    open = 0; #1;
    check(is_open && !toopen, "stays open after request drops");
    run_clk = 1;
    // selected: scan reads 1 then closes
    sel = 1;
    seg = 2'b10;
    capture_cycle(); ib = '{0, 0, 0}; shift_bits(3, ib, ob);
    check(ob[0] == 1 && ob[1] == 0 && ob[2] == 1, "SIB bit then segment");
    open = 1; #1;
    check(!toopen, "request gated while selected");
    update_cycle();
    check(!is_open, "closed by scan while selected despite request");
    sel = 0; #1;
    check(is_open && toopen, "reopens once deselected");
    open = 0;
    sel = 1; capture_cycle(); ib = '{0, 0, 0}; shift_bits(3, ib, ob); update_cycle();
    check(!is_open, "closed again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
