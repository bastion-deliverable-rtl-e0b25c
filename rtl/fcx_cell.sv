// F/C/X status-flag cell of one module in the asynchronous error-signalling network.
//
// Holds the module's status flags F (fault detected) and C (fault corrected, 1 = nothing
// uncorrected), the mask X, the clock-control enable CC and a calibration-mode bit CAL.
// A 5-bit test data register gives scan access: bit 0 reads F and, written 1, clears F and
// sets C again; bit 1 is X, bit 2 CC, bit 3 CAL, bit 4 reads C (written value ignored).
// Bit 0 is the first bit scanned out. The updated copy of bit 4 is not used (C is
// read-only), which the linter reports as an unused bit.
//
// The flag setup logic runs on the module clock clk. fault_in sets F; if corrected_in is
// low at the same time C drops to 0. X forces F to 0 and C to 1 at the outputs, so a
// masked module never raises an alarm. In calibration mode F is forced to 0, C is forced to
// 0 and then follows upd_in, the local (gated) Update, so that a rising Update front comes
// back as a rising C front through the flag network (procedure of the calibration section).
//
// Timing: the F-clear request crosses from TCK to clk with a toggle and a 3-flip-flop
// synchronizer; CAL crosses through 2 flip-flops. X and CC are static configuration bits
// and are used directly in the clk domain (design choice: they only change while the
// module is idle). The c_out path from upd_in is combinational on purpose, as in the paper
// the Update and C flag travel through gates only.
//
// From the paper: F, C and X bits, CC enable bit, C default 1, the 00 state signalling
// calibration, C returning the Update front. Design choices: bit layout, the write-1-to-
// clear of F, and the CAL bit as the way the manager "instructs the instrument".
module fcx_cell
  import ijtag_pkg::*;
(
  input  logic      tck,
  input  logic      trst_n,
  input  scan_ctl_t ctl,
  input  logic      sel,
  input  logic      si,
  output logic      so,
  input  logic      upd_in,
  input  logic      clk,
  input  logic      rst_n,
  input  logic      fault_in,
  input  logic      corrected_in,
  output logic      f_out,
  output logic      c_out,
  output logic      cc_out
);

  logic [4:0] cfg;
  logic       strobe, x, cal_s, f_q, c_q, clr_tgl;
  logic [1:0] cal_sync;
  logic [2:0] clr_sync;
  logic       clr_pulse;

  tdr #(.WIDTH(5), .RESET_VAL(5'b0)) u_reg (
    .tck, .trst_n, .ctl, .sel, .si, .so,
    .cap_in({c_out, cfg[3], cfg[2], cfg[1], f_out}),
    .upd_out(cfg), .upd_strobe(strobe)
  );

  assign x      = cfg[1];
  assign cc_out = cfg[2];

  // F-clear request: toggle in the TCK domain after an update with bit 0 set
  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)               clr_tgl <= 1'b0;
    else if (strobe && cfg[0]) clr_tgl <= ~clr_tgl;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cal_sync <= '0;
      clr_sync <= '0;
    end else begin
      cal_sync <= {cal_sync[0], cfg[3]};
      clr_sync <= {clr_sync[1:0], clr_tgl};
    end
  end
  assign cal_s     = cal_sync[1];
  assign clr_pulse = clr_sync[2] ^ clr_sync[1];

  // flag setup logic
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_q <= 1'b0;
      c_q <= 1'b1;
    end else if (clr_pulse) begin
      f_q <= 1'b0;
      c_q <= 1'b1;
    end else if (fault_in && !x) begin
      f_q <= 1'b1;
      if (!corrected_in) c_q <= 1'b0;
    end
  end

  assign f_out = cal_s ? 1'b0   : (f_q && !x);
  assign c_out = cal_s ? upd_in : (c_q || x);

endmodule
