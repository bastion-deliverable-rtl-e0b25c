// Behavioural stand-in for the analog capacitor network and comparator of an ADC under
// BIST. When charge rises it raises cmp after a number of clk cycles that depends on the
// configuration: 20 + (cfg mod 97) * 3 cycles, plus 'aging' extra cycles for configurations
// whose bit 0 is set (a slowed branch of the network). cmp drops with charge.
module adc_cap_model #(
  parameter int unsigned CAP_W = 14
) (
  input  logic             clk,
  input  logic [CAP_W-1:0] cap_cfg,
  input  logic             charge,
  input  int unsigned      aging,
  output logic             cmp
);
  int unsigned cnt = 0;
  initial cmp = 1'b0;
  function automatic int unsigned delay_of(input logic [CAP_W-1:0] cfg, input int unsigned ag);
    return 20 + (int'(cfg) % 97) * 3 + (cfg[0] ? ag : 0);
  endfunction
  always @(posedge clk) begin
    if (!charge) begin
      cnt <= 0;
      cmp <= 1'b0;
    end else begin
      cnt <= cnt + 1;
      if (cnt + 1 >= delay_of(cap_cfg, aging)) cmp <= 1'b1;
    end
  end
endmodule
