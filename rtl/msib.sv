// Modified SIB for self-reconfiguring IEEE 1687 fault-monitoring networks.
//
// It is a regular SIB (S flip-flop after the scan multiplexer, U flip-flop deciding open or
// closed) with two extra terminals. 'open' requests the SIB to open; the request is gated by
// the inverted select so that a SIB lying on the active scan path never changes state while
// the Fault Manager is scanning it. The gated request sets U asynchronously, without any TCK
// edge, and leaves on 'toopen' towards the SIB one level up. 'open' is either a monitor's
// fault flag or the OR of the toopen outputs of the SIBs below. Once set, U stays open until
// a zero is updated into it through the scan path. Capture loads U into S, so the first bit
// shifted out of the SIB tells the Fault Manager whether its segment follows.
// The asynchronous set has priority over TCK events. TRST closes the SIB through the TAP's
// Test-Logic-Reset state on the next TCK edge.
// Timing tools report a loop U -> seg_sel -> select of the SIBs below -> their gated
// request -> 'open' of this SIB -> asynchronous set of U. The loop cannot oscillate: the
// set only drives U to 1 and U then holds 1, so the gating that follows only removes a
// request that has already done its work. It is a consequence of gating the request with
// the select and is kept deliberately.
module msib
  import ijtag_pkg::*;
(
  input  logic      tck,
  input  logic      trst_n,
  input  scan_ctl_t ctl,
  input  logic      sel,
  input  logic      si,
  output logic      so,
  output logic      tsi,
  input  logic      fso,
  output logic      seg_sel,
  output logic      is_open,
  input  logic      open,
  output logic      toopen
);

  logic s_q, u_q, open_g;

  assign open_g = open & ~sel;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                 s_q <= 1'b0;
    else if (ctl.reset)          s_q <= 1'b0;
    else if (sel && ctl.capture) s_q <= u_q;
    else if (sel && ctl.shift)   s_q <= u_q ? fso : si;
  end

  // TRST reaches U through the TAP: it forces Test-Logic-Reset, whose ctl.reset closes the
  // SIB on the next TCK edge, so the asynchronous set is the only asynchronous load here.
  always_ff @(posedge tck or posedge open_g) begin
    if (open_g)                 u_q <= 1'b1;
    else if (ctl.reset)         u_q <= 1'b0;
    else if (sel && ctl.update) u_q <= s_q;
  end

  assign so      = s_q;
  assign tsi     = si;
  assign seg_sel = sel & u_q;
  assign is_open = u_q;
  assign toopen  = open_g;

endmodule
