// Self-checking testbench of the self-reconfiguring fault-monitoring subsystem.
//
// A 9-monitor network (K = 3, H = 2) is initialised by its Fault Manager, then:
//  1. idle polling: every poll scan is 3 bits and a poll loop takes 7 TCK;
//  2. one fault: it is detected within 7 TCK of reaching the monitor (plus clock crossing) and
//     localized in one scan of 3 + K*H + L bits with the right index and code;
//  3. two concurrent faults in different subtrees: both reported in one localization scan
//     whose length matches the count of open SIBs worked out here;
//  4. a fault raised during a localization: reported in a later round;
//  5. a repeated fault on the same monitor after its acknowledgement.
// Expected scan lengths come from the tree shape, computed here independently of the RTL.
module srn_system_tb;
  import ijtag_pkg::*;

  localparam int unsigned K = 3, H = 2, CODE_W = 2, L = CODE_W + 1;
  localparam int unsigned N = K ** H;
  localparam int unsigned IW = $clog2(N);

  logic tck = 0, clk = 0, trst_n = 0, rst_n = 0;
  logic [N-1:0] fault = '0;
  logic [N-1:0][CODE_W-1:0] fault_code = '0;
  logic ins_tsi, ins_sel, init_done, polling, detect, loc_valid, loc_done, error_flag;
  logic [IW-1:0] loc_index;
  logic [CODE_W-1:0] loc_code;
  logic [31:0] last_scan_len;
  logic [N-1:0] mon_flag;

  always #5 tck = ~tck;
  always #2 clk = ~clk;

  srn_system #(.K(K), .H(H), .CODE_W(CODE_W)) dut (
    .tck, .trst_n, .clk, .rst_n, .fault, .fault_code, .ins_tsi, .ins_fso(ins_tsi), .ins_sel,
    .init_done, .polling, .detect, .loc_valid, .loc_index, .loc_code, .loc_done,
    .last_scan_len, .error_flag, .mon_flag
  );

  int checks = 0, failures = 0;
  int n_detect = 0, n_loc = 0, n_multi = 0, n_during = 0, n_reports = 0;
  int cyc = 0;
  always @(posedge tck) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reports collected by the monitor below
  int rep_idx[$], rep_code[$];
  always @(posedge tck) if (loc_valid) begin
    rep_idx.push_back(int'(loc_index)); rep_code.push_back(int'(loc_code)); n_reports++;
  end
  always @(posedge tck) if (detect) n_detect++;

  // expected localization length for a set of faulty monitors
  function automatic int exp_len(input bit [N-1:0] set);
    int len = 3;                          // ErrorFlag, SIB0, SIB_ins
    bit open_inner [int];
    len += K;                             // level-1 SIB bits
    for (int m = 0; m < N; m++) if (set[m]) begin
      for (int l = 1; l < H; l++) open_inner[l * 1000 + m / (K ** (H - l))] = 1;
    end
    len += K * open_inner.num();          // children of every open inner SIB
    len += L * $countones(set);           // EMRs
    return len;
  endfunction

  task automatic pulse_fault(input int m, input int code);
    @(negedge clk); fault[m] = 1; fault_code[m] = CODE_W'(code);
    @(negedge clk); fault[m] = 0;
  endtask

  task automatic wait_loc_done(output int len);
    int t0 = cyc;
    while (!loc_done && cyc - t0 < 2000) @(posedge tck);
    check(loc_done, "localization finished");
    @(posedge tck);
    len = int'(last_scan_len);
  endtask

  // poll loop period: cycles between consecutive Capture-DR states while polling
  int last_cap = -1, poll_period = 0;
  always @(posedge tck) if (dut.u_tap.state == TAP_CAP_DR) begin
    if (polling && last_cap >= 0) poll_period = cyc - last_cap;
    last_cap = cyc;
  end

  initial begin
    int len, t0, lat;
    repeat (3) @(posedge tck);
    trst_n = 1; rst_n = 1;
    t0 = cyc;
    while (!init_done && cyc - t0 < 5000) @(posedge tck);
    check(init_done, "initialisation completes");
    check(last_scan_len == 3 + (K + K * K) + N * L, "final init scan covers whole tree");
    repeat (40) @(posedge tck);
    check(last_scan_len == 3, "poll scan is 3 bits");
    check(poll_period == 7, $sformatf("poll loop is 7 TCK (got %0d)", poll_period));
    check(n_detect == 0 && error_flag == 0, "no detection without faults");

    // 2. single fault
    rep_idx.delete(); rep_code.delete();
    pulse_fault(5, 2);
    t0 = cyc;
    while (!detect && cyc - t0 < 100) @(posedge tck);
    lat = cyc - t0;
    check(detect, "single fault detected");
    check(lat <= 8, $sformatf("detection within 8 TCK (got %0d)", lat));
    wait_loc_done(len); n_loc++;
    check(len == 3 + K * H + L, $sformatf("single-fault localization scan %0d bits", len));
    check(len == exp_len(N'(1) << 5), "matches tree count");
    check(rep_idx.size() == 1 && rep_idx[0] == 5 && rep_code[0] == 2, "monitor 5 code 2 reported");
    repeat (30) @(posedge tck);
    check(mon_flag == '0, "flag acknowledged");

    // 3. two concurrent faults in different subtrees
    rep_idx.delete(); rep_code.delete();
    @(negedge clk); fault[1] = 1; fault_code[1] = 2'd1; fault[7] = 1; fault_code[7] = 2'd3;
    @(negedge clk); fault[1] = 0; fault[7] = 0;
    wait_loc_done(len); n_loc++; n_multi++;
    check(len == exp_len((N'(1) << 1) | (N'(1) << 7)), $sformatf("two-fault scan %0d bits", len));
    check(rep_idx.size() == 2, "two reports");
    if (rep_idx.size() == 2) begin
      // last subtree is scanned out first
      check(rep_idx[0] == 7 && rep_code[0] == 3, "monitor 7 code 3 first");
      check(rep_idx[1] == 1 && rep_code[1] == 1, "monitor 1 code 1 second");
    end

    // 4. fault raised while a localization is running
    rep_idx.delete(); rep_code.delete();
    pulse_fault(0, 1);
    t0 = cyc;
    while (!(!polling && dut.u_tap.state == TAP_SHIFT_DR) && cyc - t0 < 200)
      @(posedge tck);
    pulse_fault(4, 2);
    n_during++;
    wait_loc_done(len); n_loc++;
    wait_loc_done(len); n_loc++;
    check(rep_idx.size() == 2 && rep_idx[0] == 0 && rep_idx[1] == 4, "both faults reported, in order");
    if (rep_idx.size() == 2) check(rep_code[1] == 2, "code of later fault");

    // 5. repeated fault on monitor 5
    rep_idx.delete(); rep_code.delete();
    pulse_fault(5, 3);
    wait_loc_done(len); n_loc++;
    check(rep_idx.size() == 1 && rep_idx[0] == 5 && rep_code[0] == 3, "repeat fault reported");

    check(n_detect >= 4, "detections counted");
    check(n_multi > 0 && n_during > 0 && n_loc >= 5, "all mechanisms exercised");
    $display("mechanisms: detect=%0d localizations=%0d multi=%0d during=%0d reports=%0d",
             n_detect, n_loc, n_multi, n_during, n_reports);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
