// Flag-based error signalling network with IEEE 1687 access, clock-gating interrupts and
// Update-delay calibration.
//
// NMOD modules each own an F/C/X flag cell behind a SIB. The scan chain runs
// tdi -> SIB 0 -> SIB 1 -> ... -> SIB NMOD-1 -> tdo; an open SIB m inserts its 5-bit flag
// register in front of its own bit, so on tdo the SIB bit leaves just ahead of the register.
// Flags are aggregated asynchronously by gates: f_agg is the OR of all F outputs and
// c_agg the AND of all C outputs, and both go to the Instrument Manager, which raises irq
// for an uncorrected fault and runs the calibration. Each module clock passes a Clock
// Control gate that stops it when the module's CC bit is set and its F/C flags show an
// uncorrected fault.
//
// The Update seen by module m is (TAP Update-DR | IM calibration Update) AND the open state
// of SIB m: the local enabling gate of each hierarchy level. The calibration count is the
// round trip of that Update front to the module and of its C front back to the manager.
//
// Interface: 4-wire TAP (tck, tms, tdi, tdo, trst_n), system clock clk/rst_n, per-module
// fault_in / corrected_in from the instruments, per-module gated clocks, irq and the
// calibration handshake. From the paper: F, C, X flags, aggregation by gates, interrupt
// on uncorrected fault, CC-enabled clock blocking and calibration over Update and C.
// Design choices: flat one-level hierarchy, NMOD = 4, bit layout of the flag register.
module flag_system
  import ijtag_pkg::*;
#(
  parameter int unsigned NMOD  = 4,
  parameter int unsigned CNT_W = 16
) (
  input  logic             tck,
  input  logic             trst_n,
  input  logic             tms,
  input  logic             tdi,
  output logic             tdo,
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NMOD-1:0]  fault_in,
  input  logic [NMOD-1:0]  corrected_in,
  output logic [NMOD-1:0]  gclk,
  output logic [NMOD-1:0]  gated,
  input  logic             cal_start,
  output logic             irq,
  output logic [CNT_W-1:0] cal_count,
  output logic             cal_done,
  output logic             cal_busy,
  output logic             f_agg,
  output logic             c_agg
);

  scan_ctl_t       ctl;
  tap_state_e      tap_state_unused;
  logic [NMOD:0]   chain;
  logic [NMOD-1:0] tsi, fso, seg_sel, is_open, upd_m, f, c, cc;
  logic            upd_cal;

  tap_ctrl u_tap (.tck, .trst_n, .tms, .state(tap_state_unused), .ctl);

  assign chain[0] = tdi;

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    sib u_sib (
      .tck, .trst_n, .ctl, .sel(1'b1), .si(chain[m]), .so(chain[m+1]),
      .tsi(tsi[m]), .fso(fso[m]), .seg_sel(seg_sel[m]), .is_open(is_open[m])
    );

    assign upd_m[m] = (ctl.update || upd_cal) && is_open[m];

    fcx_cell u_cell (
      .tck, .trst_n, .ctl, .sel(seg_sel[m]), .si(tsi[m]), .so(fso[m]),
      .upd_in(upd_m[m]), .clk, .rst_n,
      .fault_in(fault_in[m]), .corrected_in(corrected_in[m]),
      .f_out(f[m]), .c_out(c[m]), .cc_out(cc[m])
    );

    clock_control u_cc (
      .clk, .cc(cc[m]), .f(f[m]), .c(c[m]), .gclk(gclk[m]), .gated(gated[m])
    );
  end

  assign tdo   = chain[NMOD];
  assign f_agg = |f;
  assign c_agg = &c;

  instrument_manager #(.CNT_W(CNT_W)) u_im (
    .clk, .rst_n, .f_agg, .c_agg, .cal_start, .irq, .upd_cal, .cal_count, .cal_done,
    .cal_busy
  );

endmodule
