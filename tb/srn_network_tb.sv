// Testbench of the self-reconfiguring network alone (K = 2, H = 2, four monitors), with the
// scan controls driven directly. Raising a monitor flag must open the SIBs on its path
// without TCK and reach the ErrorFlag; the three-bit poll scan reads the ErrorFlag first and
// opens SIB0; the localization scan must produce exactly the bit stream worked out by hand
// below (pre-order, last sibling first); EMR clear pulses acknowledge the monitor, and the
// zeros shifted in close all SIBs and unmask the EMR that was scanned.
module srn_network_tb;
  import ijtag_pkg::*;
  localparam int unsigned K = 2, H = 2, CODE_W = 2;
  localparam int unsigned N = 4, T = 6;
  logic tck = 0, trst_n = 0, scan_in = 0, scan_out, ins_tsi, ins_sel, error_flag, sib0_open;
  logic [N-1:0] flag = '0, mask, clear;
  logic [N-1:0][CODE_W-1:0] code;
  logic [T-1:0] node_open;
  scan_ctl_t ctl = '0;
  always #5 tck = ~tck;
  assign code = {2'd0, 2'd1, 2'd2, 2'd3};   // monitor i reports code 3-i
  srn_network #(.K(K), .H(H), .CODE_W(CODE_W)) dut (
    .tck, .trst_n, .ctl, .tdi(scan_in), .tdo(scan_out), .ins_tsi, .ins_fso(ins_tsi), .ins_sel,
    .flag, .code, .mask, .clear, .error_flag, .sib0_open, .node_open);
  `include "scan_drv.svh"
  int checks = 0, failures = 0, clear_seen = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge tck) if (clear[2]) clear_seen++;
  logic ib [], ob [];
  logic exp [];
  initial begin
    #12 trst_n = 1;
    @(negedge tck) ctl.reset = 1; @(negedge tck) ctl = '0;
    check(mask == 4'hF && node_open == '0 && !error_flag, "reset state");
    flag[2] = 1; #1;
    // nodes: level 1 = 0,1 ; level 2 = 2..5 ; monitor 2 hangs on node 4 under node 1
    check(node_open == 6'b010010, $sformatf("path to monitor 2 opened (%b)", node_open));
    check(error_flag, "fault reaches ErrorFlag input");
    capture_cycle(); ib = '{0, 1, 0}; shift_bits(3, ib, ob);
    check(ob[0] == 1 && ob[1] == 0 && ob[2] == 0, "poll reads ErrorFlag=1 first");
    update_cycle();
    check(sib0_open, "SIB0 opened by scan");
    capture_cycle();
    ib = new[10]; foreach (ib[i]) ib[i] = 0;
    shift_bits(10, ib, ob);
    // EF (0: selected SIBs gate their requests), SIB0, node1, node5(mon3), node4(mon2), EMR2 code=1 -> 1,0, mask 1, node0, SIB_ins
    exp = '{0, 1, 1, 0, 1, 1, 0, 1, 0, 0};
    foreach (exp[i]) check(ob[i] == exp[i], $sformatf("localization bit %0d", i));
    check(clear_seen == 10, "EMR acknowledged while on the scanned path");
    flag[2] = 0;
    update_cycle();
    check(!sib0_open && node_open == '0, "zeros close every SIB");
    check(mask == 4'b1011, "scanned EMR unmasked");
    check(!error_flag, "no error pending");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
