// Test data register (TDR) with capture, shift and update stages.
//
// WIDTH shift flip-flops: data enters at the most significant bit from si and leaves from
// bit 0 on so, so bit 0 is the first bit scanned out. While sel is high the register loads
// cap_in on capture, shifts on shift and copies the shift stage into upd_out on update;
// upd_strobe is high for the one TCK cycle after an update. Reset returns upd_out to
// RESET_VAL. Used for the ErrorFlag register and the instrument registers of the ADC-BIST
// network.
module tdr
  import ijtag_pkg::*;
#(
  parameter int unsigned    WIDTH     = 1,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             tck,
  input  logic             trst_n,
  input  scan_ctl_t        ctl,
  input  logic             sel,
  input  logic             si,
  output logic             so,
  input  logic [WIDTH-1:0] cap_in,
  output logic [WIDTH-1:0] upd_out,
  output logic             upd_strobe
);

  logic [WIDTH-1:0] sh_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                 sh_q <= '0;
    else if (ctl.reset)          sh_q <= '0;
    else if (sel && ctl.capture) sh_q <= cap_in;
    else if (sel && ctl.shift)   sh_q <= (sh_q >> 1) | (WIDTH'(si) << (WIDTH - 1));
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      upd_out    <= RESET_VAL;
      upd_strobe <= 1'b0;
    end else if (ctl.reset) begin
      upd_out    <= RESET_VAL;
      upd_strobe <= 1'b0;
    end else begin
      upd_strobe <= sel && ctl.update;
      if (sel && ctl.update) upd_out <= sh_q;
    end
  end

  assign so = sh_q[0];

endmodule
