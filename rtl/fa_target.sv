// Target circuit watched by the slack monitor: a one-bit full adder whose Sum and carry are
// captured by flip-flops on the system clock.
//
// sum = x ^ y ^ cin and cout = majority(cin, x, y), written as (cin & x) | ((cin ^ x) & y).
// sum_comb is the unregistered Sum, the critical-path end the delay sensor samples before
// the system flip-flop captures it. The inputs and the two capturing flip-flops follow the
// document's example circuit; the exact gates of the carry are this design's.
module fa_target (
  input  logic clk,
  input  logic cin,
  input  logic x,
  input  logic y,
  output logic sum_comb,
  output logic sum_q,
  output logic cout_q
);

  logic cout_comb;

  assign sum_comb  = x ^ y ^ cin;
  assign cout_comb = (cin & x) | ((cin ^ x) & y);

  always_ff @(posedge clk) begin
    sum_q  <= sum_comb;
    cout_q <= cout_comb;
  end

endmodule
