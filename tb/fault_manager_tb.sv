// Testbench of the Fault Manager on the two-monitor network of the document's example
// (K = 2, H = 1: SIB_ins, SIB0, ErrorFlag, SIB1/SIB2 with three-bit EMRs). Monitor flags are
// modelled here: set on request, dropped when the EMR's clear is seen. Checks: the
// initialisation unmasks both EMRs; idle polling is a 3-bit scan repeated every 7 TCK; a
// fault is detected within 7 TCK; the localization scan is 8 bits (ErrorFlag, SIB0, SIB2,
// SIB1, three EMR bits, SIB_ins) and reports the right monitor and code; two faults are
// both reported in one 11-bit scan.
module fault_manager_tb;
  import ijtag_pkg::*;
  localparam int unsigned K = 2, H = 1, CODE_W = 2;
  logic tck = 0, trst_n = 0, tms, tdi, tdo, init_done, polling, detect, loc_valid, loc_done;
  logic loc_index;
  logic [1:0] loc_code;
  logic [31:0] last_scan_len;
  tap_state_e state;
  scan_ctl_t ctl;
  logic ins_tsi, ins_sel, error_flag, sib0_open;
  logic [1:0] flag = '0, mask, clear, node_open;
  logic [1:0][1:0] code = {2'd1, 2'd2};
  always #5 tck = ~tck;
  fault_manager #(.K(K), .H(H), .CODE_W(CODE_W)) dut (.tck, .trst_n, .tms, .tdi, .tdo,
    .init_done, .polling, .detect, .loc_valid, .loc_index, .loc_code, .loc_done, .last_scan_len);
  tap_ctrl u_tap (.tck, .trst_n, .tms, .state, .ctl);
  srn_network #(.K(K), .H(H), .CODE_W(CODE_W)) u_net (.tck, .trst_n, .ctl, .tdi, .tdo,
    .ins_tsi, .ins_fso(ins_tsi), .ins_sel, .flag, .code, .mask, .clear, .error_flag,
    .sib0_open, .node_open);
  always @(posedge tck) for (int i = 0; i < 2; i++) if (clear[i]) flag[i] <= 1'b0;
  int checks = 0, failures = 0, cyc = 0, reports = 0;
  int rep_idx[$];
  always @(posedge tck) cyc++;
  always @(posedge tck) if (loc_valid) begin reports++; rep_idx.push_back(int'(loc_index)); end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  int last_cap = -1, period = 0;
  always @(posedge tck) if (state == TAP_CAP_DR) begin
    if (polling && last_cap >= 0) period = cyc - last_cap;
    last_cap = cyc;
  end
  task automatic wait_done();
    int t0 = cyc;
    while (!loc_done && cyc - t0 < 500) @(posedge tck);
    check(loc_done, "localization done");
    @(posedge tck);
  endtask
  initial begin
    int t0;
    #12 trst_n = 1;
    t0 = cyc;
    while (!init_done && cyc - t0 < 500) @(posedge tck);
    check(init_done, "initialised");
    check(mask == 2'b00, "EMRs unmasked");
    repeat (30) @(posedge tck);
    check(period == 7 && last_scan_len == 3, "poll loop 7 TCK, 3-bit scan");
    check(!sib0_open && node_open == 2'b00, "network closed while polling");
    // single fault on monitor 0 (SIB1)
    @(negedge tck) flag[0] = 1;
    t0 = cyc;
    while (!detect && cyc - t0 < 50) @(posedge tck);
    check(cyc - t0 <= 8, $sformatf("detected within 7 TCK + 1 register (%0d)", cyc - t0));
    wait_done();
    check(last_scan_len == 8, $sformatf("8-bit localization scan (%0d)", last_scan_len));
    check(reports == 1 && rep_idx[0] == 0 && loc_code == 2'd2, "monitor 0 code 2");
    check(flag == 2'b00, "acknowledged");
    // two faults
    rep_idx.delete();
    @(negedge tck) flag = 2'b11;
    wait_done();
    check(last_scan_len == 11, $sformatf("11-bit scan for two faults (%0d)", last_scan_len));
    check(rep_idx.size() == 2 && rep_idx[0] == 1 && rep_idx[1] == 0, "monitor 1 then 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
