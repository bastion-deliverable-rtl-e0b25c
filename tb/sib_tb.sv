// Testbench of the SIB: with a 3-bit shift register modelled in the segment, checks that a
// closed SIB is a 1-bit path, that updating a 1 opens it (path 1 + 3 bits, SIB bit first
// out), that capture loads U into S, that an unselected SIB ignores scans and that reset
// closes it again.
module sib_tb;
  import ijtag_pkg::*;
  logic tck = 0, trst_n = 0, sel = 1, scan_in = 0, scan_out, tsi, fso, seg_sel, is_open;
  scan_ctl_t ctl = '0;
  logic [2:0] seg = '0;
  always #5 tck = ~tck;
  sib dut (.tck, .trst_n, .ctl, .sel, .si(scan_in), .so(scan_out), .tsi, .fso, .seg_sel, .is_open);
  always @(posedge tck) if (seg_sel && ctl.shift) seg <= {tsi, seg[2:1]};
  assign fso = seg[0];
  `include "scan_drv.svh"
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic ib [], ob [];
  initial begin
    #12 trst_n = 1;
    check(!is_open && !seg_sel, "reset closed");
    capture_cycle(); ib = '{1}; shift_bits(1, ib, ob);
    check(ob[0] == 0, "closed SIB captures 0");
    update_cycle(); check(is_open && seg_sel, "opened by update");
    seg = 3'b101;
    capture_cycle(); ib = '{0, 1, 1, 0}; shift_bits(4, ib, ob);
    check(ob[0] == 1, "S captured U=1 and leaves first");
    check(ob[1] == 1 && ob[2] == 0 && ob[3] == 1, "segment follows SIB bit");
    check(seg == 3'b011, "segment loaded");
    update_cycle(); check(!is_open, "closed by update of 0");
    sel = 0; capture_cycle(); ib = '{1}; shift_bits(1, ib, ob); update_cycle();
    check(!is_open, "unselected SIB ignores update");
    sel = 1; capture_cycle(); ib = '{1}; shift_bits(1, ib, ob); update_cycle();
    check(is_open, "reopened");
    @(negedge tck) ctl = '0; ctl.reset = 1; @(negedge tck) ctl = '0;
    check(!is_open, "TLR reset closes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
