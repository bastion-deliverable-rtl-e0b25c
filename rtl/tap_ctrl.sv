// IEEE 1149.1 TAP controller used as the entry point of the IJTAG networks.
//
// The sixteen-state machine advances on every rising TCK edge according to TMS and returns
// to Test-Logic-Reset on an asynchronous TRST (active low). Only the data-register branch is
// used: the network is connected as the single data register between TDI and TDO, so this
// design keeps no instruction register and the IR branch is walked through without effect.
// ctl carries reset/capture/shift/update while the machine is in Test-Logic-Reset,
// Capture-DR, Shift-DR and Update-DR; each scan cell acts on the TCK edge that leaves that
// state (the update of a cell thus happens on the rising edge rather than the falling edge of
// Update-DR, which does not change what is scanned).
module tap_ctrl
  import ijtag_pkg::*;
(
  input  logic       tck,
  input  logic       trst_n,
  input  logic       tms,
  output tap_state_e state,
  output scan_ctl_t  ctl
);

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TAP_TLR;
    else         state <= tap_next(state, tms);
  end

  always_comb begin
    ctl.reset   = (state == TAP_TLR);
    ctl.capture = (state == TAP_CAP_DR);
    ctl.shift   = (state == TAP_SHIFT_DR);
    ctl.update  = (state == TAP_UPD_DR);
  end

endmodule
