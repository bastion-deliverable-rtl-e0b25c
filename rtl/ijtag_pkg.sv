// Shared types and helpers for the IEEE 1687 (IJTAG) scan networks.
//
// tap_state_e and tap_next() give the sixteen-state IEEE 1149.1 TAP state machine; the TAP
// controller and the Fault Manager (which mirrors the TAP it drives) both use them.
// scan_ctl_t is the bundle of data-register controls every scan cell receives: reset (the TAP
// is in Test-Logic-Reset), capture, shift and update. All cells act on the rising TCK edge that
// leaves the named TAP state.
// The tree helpers size the balanced k-ary network of modified SIBs: level l (1..h) holds k^l
// nodes, stored level after level in one flat array.
package ijtag_pkg;

  typedef enum logic [3:0] {
    TAP_TLR, TAP_RTI,
    TAP_SEL_DR, TAP_CAP_DR, TAP_SHIFT_DR, TAP_EXIT1_DR, TAP_PAUSE_DR, TAP_EXIT2_DR, TAP_UPD_DR,
    TAP_SEL_IR, TAP_CAP_IR, TAP_SHIFT_IR, TAP_EXIT1_IR, TAP_PAUSE_IR, TAP_EXIT2_IR, TAP_UPD_IR
  } tap_state_e;

  typedef struct packed {
    logic reset;    // TAP in Test-Logic-Reset: return to reset values
    logic capture;  // Capture-DR
    logic shift;    // Shift-DR
    logic update;   // Update-DR
  } scan_ctl_t;

  function automatic tap_state_e tap_next(tap_state_e s, logic tms);
    unique case (s)
      TAP_TLR:      return tms ? TAP_TLR      : TAP_RTI;
      TAP_RTI:      return tms ? TAP_SEL_DR   : TAP_RTI;
      TAP_SEL_DR:   return tms ? TAP_SEL_IR   : TAP_CAP_DR;
      TAP_CAP_DR:   return tms ? TAP_EXIT1_DR : TAP_SHIFT_DR;
      TAP_SHIFT_DR: return tms ? TAP_EXIT1_DR : TAP_SHIFT_DR;
      TAP_EXIT1_DR: return tms ? TAP_UPD_DR   : TAP_PAUSE_DR;
      TAP_PAUSE_DR: return tms ? TAP_EXIT2_DR : TAP_PAUSE_DR;
      TAP_EXIT2_DR: return tms ? TAP_UPD_DR   : TAP_SHIFT_DR;
      TAP_UPD_DR:   return tms ? TAP_SEL_DR   : TAP_RTI;
      TAP_SEL_IR:   return tms ? TAP_TLR      : TAP_CAP_IR;
      TAP_CAP_IR:   return tms ? TAP_EXIT1_IR : TAP_SHIFT_IR;
      TAP_SHIFT_IR: return tms ? TAP_EXIT1_IR : TAP_SHIFT_IR;
      TAP_EXIT1_IR: return tms ? TAP_UPD_IR   : TAP_PAUSE_IR;
      TAP_PAUSE_IR: return tms ? TAP_EXIT2_IR : TAP_PAUSE_IR;
      TAP_EXIT2_IR: return tms ? TAP_UPD_IR   : TAP_SHIFT_IR;
      TAP_UPD_IR:   return tms ? TAP_SEL_DR   : TAP_RTI;
      default:      return TAP_TLR;
    endcase
  endfunction

  // b^e for elaboration-time sizing
  function automatic int unsigned ipow(int unsigned b, int unsigned e);
    return b ** e;
  endfunction

  // index of the first node of level l (l >= 1) in the flat node array:
  // k + k^2 + ... + k^(l-1) = (k^l - k) / (k - 1)
  function automatic int unsigned level_offset(int unsigned k, int unsigned l);
    if (k < 2) return l - 1;
    return (k ** l - k) / (k - 1);
  endfunction

  // number of modified SIBs in a balanced tree of h levels below SIB0
  function automatic int unsigned tree_nodes(int unsigned k, int unsigned h);
    return level_offset(k, h + 1);
  endfunction

endpackage
