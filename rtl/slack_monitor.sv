// Online timing-slack (aging) monitor.
//
// NUM_FF flip-flops all sample the same Data line, each on its own clock: clk_taps[0] is the
// ClockEnable line itself and every further tap is the previous one delayed by one delay
// element (see clk_delay_line). The taps span the guard-band window placed ahead of the
// system clock edge. When the monitored path is healthy Data is stable across the window
// and all flip-flops hold the same value. When aging has slowed the path, Data still moves
// inside the window: the earliest flip-flop keeps the old value, later ones the new one, and
// Warning rises. The flip-flop contents q show where in the window the transition fell,
// which is the measured slack; they are meant to be read out through IJTAG.
// Four flip-flops and the "outputs differ" comparison follow the document (drawn there as
// two NAND gates and a final gate); this design writes the comparison as a plain mismatch
// test. While the taps rise one after the other the flip-flops briefly disagree even for a
// healthy path, so the mismatch is registered on the falling edge of the last tap, after
// the window has closed (design choice). Warning then holds for one ClockEnable period.
module slack_monitor #(
  parameter int unsigned NUM_FF = 4
) (
  input  logic [NUM_FF-1:0] clk_taps,
  input  logic              data,
  output logic [NUM_FF-1:0] q,
  output logic              warning
);

  // one separate flip-flop per delayed clock
  for (genvar i = 0; i < NUM_FF; i++) begin : g_ff
    logic q_ff;
    always_ff @(posedge clk_taps[i]) q_ff <= data;
    assign q[i] = q_ff;
  end

  logic mismatch;
  assign mismatch = !((&q) || !(|q));

  always_ff @(negedge clk_taps[NUM_FF-1]) warning <= mismatch;

endmodule
