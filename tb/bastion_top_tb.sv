// End-to-end testbench of the top level at its full default size (3-ary tree of height 7,
// 2187 fault monitors; three ADCs; four slack flip-flops; four flag modules). No parameter
// is overridden. One complete operation of every part, each mechanism counted:
//  - Fault Manager initialisation of the whole network, then one fault on a random monitor
//    detected by polling and localized in one scan of 3 + K*H + L = 27 bits;
//  - one ADC BIST run over the ADC TAP (39-bit set-up scan, 9-bit status read, pass);
//  - a late-arriving adder input raises the slack-monitor warning, an early one does not;
//  - the warning becomes F of flag module 0 and an interrupt; clearing F over the flag TAP
//    removes it;
//  - the trigger logic fires once on its source.
// A mechanism that never happened fails the run.
module bastion_top_tb;
  timeunit 1ps; timeprecision 1ps;
  import ijtag_pkg::*;
  import trig_pkg::*;
  localparam int K = 3, H = 7, CODE_W = 2, L = CODE_W + 1, N = K ** H, IW = $clog2(N);
  localparam int NA = 3, DW = 30, NMOD = 4;

  logic tck = 0, trst_n = 0, clk = 0, rst_n = 0;
  logic [N-1:0] mon_fault = '0;
  logic [N-1:0][CODE_W-1:0] mon_fault_code = '0;
  logic ins_tsi, ins_sel, fm_init_done, fm_polling, fm_detect, fm_loc_valid, fm_loc_done;
  logic fm_error_flag;
  logic [IW-1:0] fm_loc_index;
  logic [CODE_W-1:0] fm_loc_code;
  logic [31:0] fm_last_scan_len;
  logic [N-1:0] mon_flag;
  logic tms = 1, tdi = 0, tdo, adc_tdo, flg_tdo;
  int port = 0;                                  // 0: ADC TAP, 1: flag TAP
  logic [NA-1:0][13:0] adc_cap_cfg;
  logic [NA-1:0] adc_charge, adc_cmp, adc_bist_done, adc_bist_status;
  int unsigned aging [NA] = '{0, 0, 0};
  logic fa_cin = 0, fa_x = 0, fa_y = 0, fa_sum_q, fa_cout_q, slack_warning;
  logic [3:0] slack_q;
  logic [NMOD-1:0] flg_fault = '0, flg_corrected = '0, mod_gclk, mod_gated;
  logic cal_start = 0, irq, cal_done, cal_busy;
  logic [15:0] cal_count;
  trig_cfg_t trg_cfg;
  logic trg_arm = 0, trg_clear = 0, trg_src = 0, trg_instr_done = 0, trg_trigger, trg_armed;

  always #50000 tck = ~tck;
  always #5000 clk = ~clk;

  assign tdo = (port == 0) ? adc_tdo : flg_tdo;

  bastion_top dut (
    .tck, .trst_n, .clk, .rst_n, .mon_fault, .mon_fault_code, .ins_tsi, .ins_fso(ins_tsi),
    .ins_sel, .fm_init_done, .fm_polling, .fm_detect, .fm_loc_valid, .fm_loc_index,
    .fm_loc_code, .fm_loc_done, .fm_last_scan_len, .fm_error_flag, .mon_flag,
    .adc_tms(port == 0 ? tms : 1'b0), .adc_tdi(tdi), .adc_tdo, .adc_cap_cfg, .adc_charge,
    .adc_cmp, .adc_bist_done, .adc_bist_status, .fa_cin, .fa_x, .fa_y, .fa_sum_q, .fa_cout_q,
    .slack_q, .slack_warning, .flg_tms(port == 1 ? tms : 1'b0), .flg_tdi(tdi), .flg_tdo,
    .flg_fault, .flg_corrected, .mod_gclk, .mod_gated, .cal_start, .irq, .cal_count,
    .cal_done, .cal_busy, .trg_cfg, .trg_arm, .trg_clear, .trg_src, .trg_instr_done,
    .trg_trigger, .trg_armed
  );

  for (genvar a = 0; a < NA; a++) begin : g_cap
    adc_cap_model u_cap (.clk, .cap_cfg(adc_cap_cfg[a]), .charge(adc_charge[a]),
      .aging(aging[a]), .cmp(adc_cmp[a]));
  end

  `include "jtag_drv.svh"

  int checks = 0, failures = 0;
  int n_init = 0, n_detect = 0, n_loc = 0, n_adc = 0, n_slack = 0, n_irq = 0, n_fclear = 0;
  int n_trig = 0, n_warn_edges = 0;
  always @(posedge slack_warning) n_warn_edges++;
  always @(posedge trg_trigger) n_trig++;
  always @(posedge tck) if (fm_detect) n_detect++;

  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic vec [], ob [];
  // ADC network scan vector (see the ADC network testbench): SIB_ins open, then per ADC a
  // conf SIB (2-bit TDR) and a data SIB (30-bit TDR), ADC 3 nearest to TDI
  task automatic build(input int open_a, input bit with_data, input int next_a,
                       input bit next_data, input logic [1:0] conf, input logic [DW-1:0] data);
    logic tmp [$];
    tmp.push_back(1'b1);
    for (int p = 2 * NA - 1; p >= 0; p--) begin
      int a;
      bit is_data;
      a = NA - 1 - p / 2;
      is_data = p % 2;
      tmp.push_back(a == next_a && (!is_data || next_data));
      if (a == open_a && (!is_data || with_data)) begin
        if (is_data) for (int b = 0; b < DW; b++) tmp.push_back(data[b]);
        else for (int b = 0; b < 2; b++) tmp.push_back(conf[b]);
      end
    end
    vec = new[tmp.size()];
    foreach (tmp[i]) vec[i] = tmp[i];
  endtask

  // fault-monitor network
  task automatic srn_part();
    int m, code, t0;
    bit seen;
    t0 = 0;
    while (!fm_init_done && t0 < 40000) begin @(posedge tck); t0++; end
    check(fm_init_done && fm_polling, "Fault Manager initialised the full network");
    if (fm_init_done) n_init++;
    repeat (20) @(posedge tck);
    m = $urandom_range(0, N - 1);
    code = $urandom_range(1, 3);
    @(negedge clk) begin mon_fault[m] = 1; mon_fault_code[m] = CODE_W'(code); end
    @(negedge clk) mon_fault[m] = 0;
    seen = 0;
    t0 = 0;
    while (!fm_loc_done && t0 < 400) begin
      @(posedge tck); t0++;
      if (fm_loc_valid && int'(fm_loc_index) == m && int'(fm_loc_code) == code) seen = 1;
    end
    @(posedge tck);
    check(seen, $sformatf("monitor %0d code %0d localized", m, code));
    check(int'(fm_last_scan_len) == 3 + K * H + L,
          $sformatf("localization scan %0d bits", fm_last_scan_len));
    if (seen) n_loc++;
    repeat (60) @(posedge tck);
    check(!mon_flag[m] && fm_polling, "monitor acknowledged, polling again");
  endtask

  // ADC BIST: one run of ADC 1
  task automatic adc_part();
    logic one [];
    logic [13:0] cfg;
    int e, sc;
    port = 0;
    one = new[1]; one[0] = 1;
    tap_reset();
    dr_scan(1, one, ob);
    build(-1, 0, 0, 1, 2'b00, '0);
    dr_scan(vec.size(), vec, ob);
    cfg = 14'd123;
    e = 20 + (123 % 97) * 3;
    build(0, 1, 0, 0, 2'b01, {16'(e), cfg});
    sc = shift_count;
    dr_scan(vec.size(), vec, ob);
    check(shift_count - sc == 39, "ADC set-up scan 39 bits");
    repeat (e + 40) @(posedge clk);
    build(0, 0, 0, 1, 2'b00, '0);
    sc = shift_count;
    dr_scan(vec.size(), vec, ob);
    check(shift_count - sc == 9, "ADC status read 9 bits");
    check(ob[3] && ob[4], "ADC 1 BIST done and passed");
    if (ob[3] && ob[4]) n_adc++;
  endtask

  // slack monitor: input change 30 ps after the clock edge (inside the 4-flip-flop
  // window) versus in the middle of the cycle
  task automatic slack_part();
    int w0;
    @(posedge clk); #2000000 ;
    w0 = n_warn_edges;
    repeat (4) begin
      @(posedge clk); #3000 fa_x = ~fa_x;
    end
    repeat (2) @(posedge clk);
    check(n_warn_edges == w0, "early data change: no slack warning");
    @(posedge clk); #30 fa_x = ~fa_x;
    @(posedge clk); #1;
    check(n_warn_edges == w0 + 1, "late data change: slack warning");
    if (n_warn_edges == w0 + 1) n_slack++;
  endtask

  // flag network: warning -> F of module 0 -> irq; clear F over the flag TAP
  task automatic flag_part();
    repeat (6) @(posedge clk);
    check(irq && mod_gated == '0, "slack warning gave an interrupt (CC off: clocks run)");
    if (irq) n_irq++;
    port = 1;
    tap_reset();
    vec = new[NMOD]; foreach (vec[i]) vec[i] = 0; vec[NMOD - 1] = 1;
    dr_scan(NMOD, vec, ob);                       // open SIB 0
    vec = new[NMOD + 5]; foreach (vec[i]) vec[i] = 0;
    vec[NMOD - 1] = 1; vec[NMOD] = 1;             // keep SIB 0 open, write 1 to F
    dr_scan(NMOD + 5, vec, ob);
    check(ob[NMOD] == 1 && ob[NMOD + 5] == 0, "flag register of module 0 read F=1 C=0");
    repeat (30) @(posedge clk);                   // TCK -> clk crossing and interrupt sync
    check(!irq, "F cleared over the flag network, interrupt gone");
    if (!irq) n_fclear++;
  endtask

  task automatic trig_part();
    trg_cfg = '0;
    trg_cfg.start_mode = START_DIRECT; trg_cfg.stop_mode = STOP_TRIGGERED;
    trg_cfg.rearm_mode = REARM_SINGLE;
    @(negedge clk) trg_arm = 1; @(negedge clk) trg_arm = 0;
    @(negedge clk) trg_src = 1; repeat (3) @(negedge clk); trg_src = 0;
    repeat (3) @(negedge clk);
    check(n_trig == 1 && !trg_trigger && !trg_armed, "trigger fired once");
  endtask

  initial begin
    trg_cfg = '0;
    #120000 trst_n = 1; rst_n = 1;
    fork
      srn_part();
      begin adc_part(); slack_part(); flag_part(); trig_part(); end
    join
    check(n_detect > 0, "fault detection by polling happened");
    check(n_init > 0 && n_loc > 0 && n_adc > 0 && n_slack > 0 && n_irq > 0 && n_fclear > 0 &&
          n_trig > 0, $sformatf("every mechanism: init %0d loc %0d adc %0d slack %0d irq %0d clear %0d trig %0d",
          n_init, n_loc, n_adc, n_slack, n_irq, n_fclear, n_trig));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
