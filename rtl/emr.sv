// Error-code / Mask Register (EMR) between a fault-monitoring instrument and the network.
//
// An L = CODE_W+1 bit scan register: bits [CODE_W-1:0] hold the error code written by the
// instrument, bit CODE_W the mask written by the Fault Manager. Bit 0 leaves first, so the
// Fault Manager reads the code, least significant bit first, and then the mask. On capture
// the register loads {mask, code_in}; on update the mask takes the shifted-in mask bit, the
// code field is read-only. The mask resets to 1, so no monitor can reconfigure the network
// until the Fault Manager has unmasked it. clear is high in every TCK cycle in which the
// register is selected and shifting: that is the acknowledgement of the monitor's fault.
module emr
  import ijtag_pkg::*;
#(
  parameter int unsigned CODE_W = 2
) (
  input  logic              tck,
  input  logic              trst_n,
  input  scan_ctl_t         ctl,
  input  logic              sel,
  input  logic              si,
  output logic              so,
  input  logic [CODE_W-1:0] code_in,
  output logic              mask,
  output logic              clear
);

  localparam int unsigned L = CODE_W + 1;

  logic [L-1:0] sh_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                 sh_q <= '0;
    else if (ctl.reset)          sh_q <= '0;
    else if (sel && ctl.capture) sh_q <= {mask, code_in};
    else if (sel && ctl.shift)   sh_q <= {si, sh_q[L-1:1]};
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                mask <= 1'b1;
    else if (ctl.reset)         mask <= 1'b1;
    else if (sel && ctl.update) mask <= sh_q[L-1];
  end

  assign so    = sh_q[0];
  assign clear = sel & ctl.shift;

endmodule
