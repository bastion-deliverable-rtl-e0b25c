// Clock Control block: blocks the clock of a module with an uncorrected fault.
//
// When the JTAG-configurable enable cc is set and the module's flags show a fault that was
// not corrected (F = 1, C = 0), the module clock is stopped, which acts as an internal
// interrupt that halts further task execution. The gate is a latch-based clock gate: the
// enable is sampled by a latch that is transparent while clk is low, so gclk never gets a
// glitch or a shortened pulse. A cleared fault (F back to 0 or C to 1) lets the clock run
// again from the next rising edge.
//
// Interface: clk in, cc/f/c flag inputs (from the F/C/X cell), gclk out, gated flag.
// From the paper: blocking of the system clock from the F and C combination, enabled by a
// CC bit. Design choice: the latch-based gate cell.
module clock_control (
  input  logic clk,
  input  logic cc,
  input  logic f,
  input  logic c,
  output logic gclk,
  output logic gated
);

  logic en, en_l;

  assign en = !(cc && f && !c);

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk  = clk && en_l;
  assign gated = !en_l;

endmodule
