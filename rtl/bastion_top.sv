// Top level: the aging-fault detection and instrument-access structures side by side.
//
// Contains
//  - the self-reconfiguring fault-monitor network with its Fault Manager (srn_system):
//    K^H fault monitors behind a balanced K-ary SIB tree, polled and localized
//    autonomously on tck; its SIB_ins segment is brought out as ports,
//  - the optimized ADC-BIST access network (adc_bist_system) with its own TAP port; the
//    analog capacitor arrays and comparators of the ADCs are outside and connect through
//    cap_cfg / charge / cmp,
//  - the slack monitor path: a full adder as target circuit clocked by clk, a delay line
//    giving four delayed copies of clk, and the slack monitor sampling the adder's
//    combinational sum on them,
//  - the F/C/X flag network with Clock Control gates and Instrument Manager (flag_system)
//    with its own TAP port,
//  - the trigger logic for triggered instrument execution.
// Glue (design choice): the slack-monitor warning is OR-ed into the fault input of flag
// module 0, so a shrinking timing slack becomes a flagged fault, an interrupt and, with CC
// set, a stopped module clock. Everything else keeps its own ports.
//
// Clocks: tck (all IJTAG networks, shared), clk (system clock: fault monitors, ADC BIST
// logic, flag setup logic, Instrument Manager, adder, trigger logic). The delay line is a
// behavioural model: synthesis keeps only its wiring, a real chip uses delay cells.
// Parameter defaults are the paper's sizes: 3-ary tree of height 7 (2187 monitors), three
// ADCs with 14-bit capacitor configuration and 16-bit counter reference, four slack
// flip-flops. NMOD = 4 flag modules and the 20 ps delay stage are not given by the paper.
module bastion_top
  import ijtag_pkg::*;
  import trig_pkg::*;
#(
  parameter int unsigned K        = 3,
  parameter int unsigned H        = 7,
  parameter int unsigned CODE_W   = 2,
  parameter int unsigned NUM_ADC  = 3,
  parameter int unsigned CAP_W    = 14,
  parameter int unsigned CNT_W    = 16,
  parameter int unsigned NUM_FF   = 4,
  parameter int unsigned STAGE_PS = 20,
  parameter int unsigned NMOD     = 4,
  localparam int unsigned N  = ipow(K, H),
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                          tck,
  input  logic                          trst_n,
  input  logic                          clk,
  input  logic                          rst_n,
  // fault-monitor network
  input  logic [N-1:0]                  mon_fault,
  input  logic [N-1:0][CODE_W-1:0]      mon_fault_code,
  output logic                          ins_tsi,
  input  logic                          ins_fso,
  output logic                          ins_sel,
  output logic                          fm_init_done,
  output logic                          fm_polling,
  output logic                          fm_detect,
  output logic                          fm_loc_valid,
  output logic [IW-1:0]                 fm_loc_index,
  output logic [CODE_W-1:0]             fm_loc_code,
  output logic                          fm_loc_done,
  output logic [31:0]                   fm_last_scan_len,
  output logic                          fm_error_flag,
  output logic [N-1:0]                  mon_flag,
  // ADC-BIST network
  input  logic                          adc_tms,
  input  logic                          adc_tdi,
  output logic                          adc_tdo,
  output logic [NUM_ADC-1:0][CAP_W-1:0] adc_cap_cfg,
  output logic [NUM_ADC-1:0]            adc_charge,
  input  logic [NUM_ADC-1:0]            adc_cmp,
  output logic [NUM_ADC-1:0]            adc_bist_done,
  output logic [NUM_ADC-1:0]            adc_bist_status,
  // slack monitor path
  input  logic                          fa_cin,
  input  logic                          fa_x,
  input  logic                          fa_y,
  output logic                          fa_sum_q,
  output logic                          fa_cout_q,
  output logic [NUM_FF-1:0]             slack_q,
  output logic                          slack_warning,
  // flag network
  input  logic                          flg_tms,
  input  logic                          flg_tdi,
  output logic                          flg_tdo,
  input  logic [NMOD-1:0]               flg_fault,
  input  logic [NMOD-1:0]               flg_corrected,
  output logic [NMOD-1:0]               mod_gclk,
  output logic [NMOD-1:0]               mod_gated,
  input  logic                          cal_start,
  output logic                          irq,
  output logic [15:0]                   cal_count,
  output logic                          cal_done,
  output logic                          cal_busy,
  // trigger logic
  input  trig_cfg_t                     trg_cfg,
  input  logic                          trg_arm,
  input  logic                          trg_clear,
  input  logic                          trg_src,
  input  logic                          trg_instr_done,
  output logic                          trg_trigger,
  output logic                          trg_armed
);

  logic [NUM_FF-1:0] taps;
  logic              sum_comb;
  logic [NMOD-1:0]   flg_fault_all;
  logic              f_agg_unused, c_agg_unused;

  srn_system #(.K(K), .H(H), .CODE_W(CODE_W)) u_srn (
    .tck, .trst_n, .clk, .rst_n, .fault(mon_fault), .fault_code(mon_fault_code),
    .ins_tsi, .ins_fso, .ins_sel, .init_done(fm_init_done), .polling(fm_polling),
    .detect(fm_detect), .loc_valid(fm_loc_valid), .loc_index(fm_loc_index),
    .loc_code(fm_loc_code), .loc_done(fm_loc_done), .last_scan_len(fm_last_scan_len),
    .error_flag(fm_error_flag), .mon_flag
  );

  adc_bist_system #(.NUM_ADC(NUM_ADC), .CAP_W(CAP_W), .CNT_W(CNT_W)) u_adc (
    .tck, .trst_n, .tms(adc_tms), .tdi(adc_tdi), .tdo(adc_tdo), .clk, .rst(!rst_n),
    .cap_cfg(adc_cap_cfg), .charge(adc_charge), .cmp(adc_cmp), .bist_done(adc_bist_done),
    .bist_status(adc_bist_status)
  );

  fa_target u_fa (
    .clk, .cin(fa_cin), .x(fa_x), .y(fa_y), .sum_comb, .sum_q(fa_sum_q), .cout_q(fa_cout_q)
  );

  clk_delay_line #(.NUM_TAPS(NUM_FF), .STAGE_PS(STAGE_PS)) u_dly (.clk_en(clk), .taps);

  slack_monitor #(.NUM_FF(NUM_FF)) u_slack (
    .clk_taps(taps), .data(sum_comb), .q(slack_q), .warning(slack_warning)
  );

  assign flg_fault_all = flg_fault | NMOD'(slack_warning);

  flag_system #(.NMOD(NMOD), .CNT_W(16)) u_flag (
    .tck, .trst_n, .tms(flg_tms), .tdi(flg_tdi), .tdo(flg_tdo), .clk, .rst_n,
    .fault_in(flg_fault_all), .corrected_in(flg_corrected), .gclk(mod_gclk),
    .gated(mod_gated), .cal_start, .irq, .cal_count, .cal_done, .cal_busy,
    .f_agg(f_agg_unused), .c_agg(c_agg_unused)
  );

  trigger_logic u_trig (
    .clk, .rst_n, .cfg(trg_cfg), .arm(trg_arm), .clear(trg_clear), .trig_src(trg_src),
    .instr_done(trg_instr_done), .trigger(trg_trigger), .armed(trg_armed)
  );

endmodule
