// IJTAG network controlling three ADC-BIST instances, in its version optimized for in-field
// and production test.
//
// Scan path behind the TAP: SIB_ins, whose segment chains, from TDI towards TDO, the SIBs of
// ADC3-conf, ADC3-data, ADC2-conf, ADC2-data, ADC1-conf and ADC1-data. Each of these SIBs
// has one TDR in its segment:
//  * conf TDR, 2 bits: bit 0 writes start and reads done, bit 1 writes interrupt and reads
//    status;
//  * data TDR, 30 bits: bits [13:0] write capData, bits [29:14] counterRef; it reads
//    DataOut in bits [15:0] (upper bits read 0).
// Splitting the single-bit control and status from the wide data is what makes the network
// cheap for in-field use: with SIB_ins, one ADC's two SIBs open, setting up a run takes a
// 39-bit scan (7 SIB bits + 2 + 30), and reading only done/status a 9-bit scan (7 + 2) once
// the data SIB is closed. The scan lengths and the split follow the document; bit positions
// inside the TDRs are this design's choice.
// Clock crossing: each Update-DR of a conf TDR with start = 1 toggles a TCK-domain bit; the
// engine's clock domain synchronises it in two flip-flops and turns each change into a
// one-cycle start pulse. interrupt is synchronised the same way. capData and counterRef are
// stable long before the start pulse; done, status and DataOut are static when read.
module adc_bist_system
  import ijtag_pkg::*;
#(
  parameter int unsigned NUM_ADC = 3,
  parameter int unsigned CAP_W   = 14,
  parameter int unsigned CNT_W   = 16
) (
  input  logic                          tck,
  input  logic                          trst_n,
  input  logic                          tms,
  input  logic                          tdi,
  output logic                          tdo,
  input  logic                          clk,
  input  logic                          rst,
  // analog side of each ADC's capacitor network
  output logic [NUM_ADC-1:0][CAP_W-1:0] cap_cfg,
  output logic [NUM_ADC-1:0]            charge,
  input  logic [NUM_ADC-1:0]            cmp,
  // observation
  output logic [NUM_ADC-1:0]            bist_done,
  output logic [NUM_ADC-1:0]            bist_status
);

  localparam int unsigned DW = CAP_W + CNT_W;
  localparam int unsigned NP = 2 * NUM_ADC;

  tap_state_e tap_state_unused;
  scan_ctl_t  ctl;
  logic ins_tsi, ins_fso, ins_sel, ins_open_unused;

  tap_ctrl u_tap (.tck, .trst_n, .tms, .state(tap_state_unused), .ctl);

  sib u_sib_ins (
    .tck, .trst_n, .ctl, .sel(1'b1), .si(tdi), .so(tdo),
    .tsi(ins_tsi), .fso(ins_fso), .seg_sel(ins_sel), .is_open(ins_open_unused)
  );

  // chain positions p = 0 .. NP-1 from TDI; ADC a (0 = ADC1) has conf at 2*(NUM_ADC-1-a)
  // and data right after it
  logic [NP-1:0] p_si, p_so, p_tsi, p_fso, p_segsel, p_open_unused;

  for (genvar p = 0; p < NP; p++) begin : g_pos
    if (p == 0) begin : g_first
      assign p_si[p] = ins_tsi;
    end else begin : g_next
      assign p_si[p] = p_so[p-1];
    end
    sib u_sib (
      .tck, .trst_n, .ctl, .sel(ins_sel), .si(p_si[p]), .so(p_so[p]),
      .tsi(p_tsi[p]), .fso(p_fso[p]), .seg_sel(p_segsel[p]), .is_open(p_open_unused[p])
    );
  end
  assign ins_fso = p_so[NP-1];

  for (genvar a = 0; a < NUM_ADC; a++) begin : g_adc
    localparam int unsigned PC = 2 * (NUM_ADC - 1 - a);
    localparam int unsigned PD = PC + 1;

    logic [1:0]       conf_upd;
    logic             conf_strobe, data_strobe_unused;
    logic [DW-1:0]    data_upd;
    logic             done, status;
    logic [CNT_W-1:0] data_out;

    tdr #(.WIDTH(2)) u_conf (
      .tck, .trst_n, .ctl, .sel(p_segsel[PC]), .si(p_tsi[PC]), .so(p_fso[PC]),
      .cap_in({status, done}), .upd_out(conf_upd), .upd_strobe(conf_strobe)
    );

    tdr #(.WIDTH(DW)) u_data (
      .tck, .trst_n, .ctl, .sel(p_segsel[PD]), .si(p_tsi[PD]), .so(p_fso[PD]),
      .cap_in(DW'(data_out)), .upd_out(data_upd), .upd_strobe(data_strobe_unused)
    );

    // start request: toggle in the TCK domain, edge in the clk domain
    logic start_tgl, interrupt_tck;
    always_ff @(posedge tck or negedge trst_n) begin
      if (!trst_n)                       start_tgl <= 1'b0;
      else if (conf_strobe && conf_upd[0]) start_tgl <= ~start_tgl;
    end
    assign interrupt_tck = conf_upd[1];

    logic [2:0] tgl_sync;
    logic [1:0] int_sync;
    always_ff @(posedge clk or posedge rst) begin
      if (rst) begin
        tgl_sync <= '0;
        int_sync <= '0;
      end else begin
        tgl_sync <= {tgl_sync[1:0], start_tgl};
        int_sync <= {int_sync[0], interrupt_tck};
      end
    end

    adc_bist #(.CAP_W(CAP_W), .CNT_W(CNT_W)) u_bist (
      .clk, .rst, .interrupt(int_sync[1]), .start(tgl_sync[2] ^ tgl_sync[1]),
      .cap_data(data_upd[CAP_W-1:0]), .counter_ref(data_upd[DW-1:CAP_W]),
      .done, .status, .data_out, .cap_cfg(cap_cfg[a]), .charge(charge[a]), .cmp(cmp[a])
    );

    assign bist_done[a]   = done;
    assign bist_status[a] = status;
  end

endmodule
