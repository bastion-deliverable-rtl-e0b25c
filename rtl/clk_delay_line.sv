// Behavioural model (not synthesizable): the chain of delay elements that derives the
// sampling clocks of the slack monitor from its ClockEnable line.
//
// taps[0] is clk_en itself; taps[i] is taps[i-1] delayed by STAGE_PS picoseconds, the delay
// of one inverter-sized element. In silicon these are standard cells whose delay sets the
// monitor's resolution; the value 20 ps is this design's assumption (the document gives no
// number). Adding or removing stages changes the guard-band resolution.
module clk_delay_line #(
  parameter int unsigned NUM_TAPS = 4,
  parameter int unsigned STAGE_PS = 20
) (
  input  logic                clk_en,
  output logic [NUM_TAPS-1:0] taps
);

  assign taps[0] = clk_en;
  for (genvar i = 1; i < NUM_TAPS; i++) begin : g_stage
    assign #(STAGE_PS * 1ps) taps[i] = taps[i-1];
  end

endmodule
