// Segment Insertion Bit (SIB) of an IEEE 1687 network.
//
// A shift flip-flop S, an update flip-flop U and a two-input scan multiplexer. U decides
// whether the SIB is open (1: the hierarchical segment between tsi and fso is in the scan
// path) or closed (0: the path runs from si straight into S). S sits after the multiplexer,
// so the SIB's own state bit leaves first on so, ahead of its segment. The multiplexer, S
// and U follow the simplified SIB of the reference schematic. The cell acts only while sel
// is high (it lies on the active scan path): S captures the value of U, shifts, and U
// takes S on update. seg_sel tells the segment it is on the active path. Reset (TAP in
// Test-Logic-Reset or TRST) closes the SIB.
module sib
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
  output logic      is_open
);

  logic s_q, u_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                s_q <= 1'b0;
    else if (ctl.reset)         s_q <= 1'b0;
    else if (sel && ctl.capture) s_q <= u_q;
    else if (sel && ctl.shift)   s_q <= u_q ? fso : si;
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                u_q <= 1'b0;
    else if (ctl.reset)         u_q <= 1'b0;
    else if (sel && ctl.update) u_q <= s_q;
  end

  assign so      = s_q;
  assign tsi     = si;
  assign seg_sel = sel & u_q;
  assign is_open = u_q;

endmodule
