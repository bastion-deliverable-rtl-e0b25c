// Testbench of the three-ADC BIST network, following the round-robin flow of the document:
// for each ADC in turn, for each of its 14 (capacitance configuration, reference) pairs, set
// up and start a run, wait for the time the reference implies, read back done and status.
// The scan vectors are built here from the network's structure (SIB_ins, then per ADC a conf
// SIB with a 2-bit TDR and a data SIB with a 30-bit TDR, ADC3 nearest to TDI). Checks: the
// set-up scan is 39 bits and the status-only read 9 bits; every run of a healthy ADC passes;
// ADC2 is aged (its odd configurations charge more slowly) and exactly those runs fail;
// debug reads of DataOut return the count the stand-in implies; the ADCs not under test stay
// idle while one is tested; interrupt aborts a run.
module adc_bist_system_tb;
  localparam int NA = 3, CAP_W = 14, CNT_W = 16, DW = 30;
  logic tck = 0, trst_n = 0, tms = 1, tdi = 0, tdo, clk = 0, rst = 1;
  logic [NA-1:0][CAP_W-1:0] cap_cfg;
  logic [NA-1:0] charge, cmp, bist_done, bist_status;
  int unsigned aging [NA] = '{0, 9, 0};
  always #50 tck = ~tck;     // slow test clock
  always #5 clk = ~clk;      // functional clock
  adc_bist_system dut (.tck, .trst_n, .tms, .tdi, .tdo, .clk, .rst, .cap_cfg, .charge, .cmp,
    .bist_done, .bist_status);
  for (genvar a = 0; a < NA; a++) begin : g_cap
    adc_cap_model u_cap (.clk, .cap_cfg(cap_cfg[a]), .charge(charge[a]), .aging(aging[a]),
      .cmp(cmp[a]));
  end
  `include "jtag_drv.svh"
  int exp_fail = 0;
  int checks = 0, failures = 0, n_runs = 0, n_fail_detect = 0, n_debug = 0, n_status = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  function automatic int nominal(input logic [13:0] cfg);
    return 20 + (int'(cfg) % 97) * 3;
  endfunction

  // scan vector builder. open_conf/open_data: which ADC's SIBs are open now (-1: none);
  // new_conf/new_data: which to open after this scan; conf/data: TDR contents to write.
  logic vec [];
  task automatic build(input int open_a, input bit with_data, input int next_a,
                       input bit next_data, input logic [1:0] conf, input logic [DW-1:0] data);
    int n = 0;
    logic tmp [$];
    tmp.push_back(1'b1);                                  // SIB_ins stays open
    for (int p = 2 * NA - 1; p >= 0; p--) begin           // nearest TDO first
      int a = NA - 1 - p / 2;
      bit is_data = p % 2;
      tmp.push_back(a == next_a && (!is_data || next_data));
      if (a == open_a && (!is_data || with_data)) begin
        if (is_data) for (int b = 0; b < DW; b++) tmp.push_back(data[b]);
        else for (int b = 0; b < 2; b++) tmp.push_back(conf[b]);
      end
    end
    vec = new[tmp.size()];
    foreach (tmp[i]) vec[i] = tmp[i];
  endtask

  initial begin
    logic ob [];
    logic one [] = '{1};
    int sc, cur_a;
    logic [13:0] cfg;
    int e;
    #120 trst_n = 1; rst = 0;
    tap_reset();
    dr_scan(1, one, ob);                                  // open SIB_ins
    cur_a = -1;
    for (int a = 0; a < NA; a++) begin
      // open conf and data SIBs of ADC a (7-bit scan)
      build(-1, 0, a, 1, 2'b00, '0);
      dr_scan(vec.size(), vec, ob);
      check(vec.size() == 7, "SIB-only scan is 7 bits");
      for (int k = 0; k < 14; k++) begin
        cfg = 14'(a * 1000 + k * 37 + 3);
        e = nominal(cfg);
        if (cfg[0] && aging[a] > 0 && k % 5 != 4) exp_fail++;
        // set-up: start=1, cfg, ref; data SIB closed after this scan
        build(a, 1, a, 0, 2'b01, {16'(e), cfg});
        sc = shift_count;
        dr_scan(vec.size(), vec, ob);
        check(shift_count - sc == 39, $sformatf("set-up scan %0d bits", shift_count - sc));
        // other ADCs idle while this one is tested
        for (int o = 0; o < NA; o++) if (o != a) check(!charge[o], "other ADC idle");
        // wait for the strobe time derived from the reference (clk cycles)
        repeat (e + 40) @(posedge clk);
        if (k % 5 == 4) begin
          // debug read: status and DataOut; keep data SIB closed afterwards
          build(a, 0, a, 1, 2'b00, '0);
          dr_scan(vec.size(), vec, ob);               // reopen data SIB (9 bits)
          build(a, 1, a, 1, 2'b00, '0);
          dr_scan(vec.size(), vec, ob);               // 39 bits, read all, data SIB stays open
          begin
            logic [15:0] dout;
            // from TDO: SIB_ins, two SIB bits per ADC nearer TDO, data SIB, data TDR,
            // conf SIB, conf TDR (done, status)
            for (int b = 0; b < 16; b++) dout[b] = ob[2 + 2 * a + b];
            check(ob[33 + 2 * a] && dout == 16'(e + ((cfg[0] && aging[a] > 0) ? aging[a] : 0)),
                  $sformatf("debug DataOut %0d", dout));
            n_debug++;
          end
        end else begin
          // status-only read, reopen data SIB for the next set-up
          build(a, 0, a, 1, 2'b00, '0);
          sc = shift_count;
          dr_scan(vec.size(), vec, ob);
          check(shift_count - sc == 9, $sformatf("status read %0d bits", shift_count - sc));
          // ob: SIB_ins, ADC3c.., find conf TDR bits: they follow the conf SIB of ADC a
          begin
            // from TDO: SIB_ins, two SIB bits per ADC nearer TDO, data SIB, conf SIB, done
            int pos;
            pos = 1 + 2 * a + 2;
            check(ob[pos] == 1'b1, "done read back");
            check(ob[pos + 1] == !(cfg[0] && aging[a] > 0), $sformatf("ADC%0d cfg %0d status", a + 1, cfg));
            if (!ob[pos + 1]) n_fail_detect++;
            n_status++;
          end
        end
        n_runs++;
      end
      // close everything of this ADC
      build(a, 1, -1, 0, 2'b00, '0);
      dr_scan(vec.size(), vec, ob);
      repeat (10) @(posedge clk);
    end
    // interrupt: start a long run on ADC1 and abort it
    build(-1, 0, 0, 1, 2'b00, '0); dr_scan(vec.size(), vec, ob);
    build(0, 1, 0, 1, 2'b01, {16'd0, 14'd95}); dr_scan(vec.size(), vec, ob);
    build(0, 1, 0, 1, 2'b10, {16'd0, 14'd95}); dr_scan(vec.size(), vec, ob);
    repeat (400) @(posedge clk);
    check(!bist_done[0] && !charge[0], "interrupt aborted run");
    check(n_runs == 42 && n_fail_detect == exp_fail && n_debug > 0 && n_status > 0,
          $sformatf("runs %0d, aged failures %0d, debug %0d", n_runs, n_fail_detect, n_debug));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
