// Digital engine of the ADC built-in self-test (ADC-BIST).
//
// One run tests one capacitance configuration of the ADC's capacitor network: on a rising
// edge of start the engine loads cap_data onto cap_cfg, raises charge and counts clk cycles
// until the analog side's comparator (cmp) reports the network charged. The count is the
// result: done goes high, data_out holds the count and status tells whether it equals
// counter_ref (1 = pass). If cmp never comes the count stops at its maximum and the run
// fails. rst is the asynchronous reset, interrupt a synchronous reset that aborts a run.
// The ports of the engine (Clk, Rst, Interrupt, Start, capData 14 bits, counterRef 16 bits;
// Done, Status, DataOut 16 bits) follow the document; the counting scheme is the simplest
// reading of "the test will run for a time proportional to the reference counter value" and
// is this design's own, as is the charge/cmp interface to the analog part.
// Timing: the count is the number of clk cycles from the cycle after start is seen to the
// cycle cmp is seen high.
module adc_bist #(
  parameter int unsigned CAP_W = 14,
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             interrupt,
  input  logic             start,
  input  logic [CAP_W-1:0] cap_data,
  input  logic [CNT_W-1:0] counter_ref,
  output logic             done,
  output logic             status,
  output logic [CNT_W-1:0] data_out,
  // analog side
  output logic [CAP_W-1:0] cap_cfg,
  output logic             charge,
  input  logic             cmp
);

  logic             start_q, running;
  logic [CNT_W-1:0] cnt, ref_q;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      start_q  <= 1'b0;
      running  <= 1'b0;
      cnt      <= '0;
      ref_q    <= '0;
      done     <= 1'b0;
      status   <= 1'b0;
      data_out <= '0;
      cap_cfg  <= '0;
      charge   <= 1'b0;
    end else if (interrupt) begin
      start_q  <= start;
      running  <= 1'b0;
      cnt      <= '0;
      done     <= 1'b0;
      status   <= 1'b0;
      charge   <= 1'b0;
    end else begin
      start_q <= start;
      if (start && !start_q) begin
        running <= 1'b1;
        cnt     <= '0;
        ref_q   <= counter_ref;
        cap_cfg <= cap_data;
        charge  <= 1'b1;
        done    <= 1'b0;
        status  <= 1'b0;
      end else if (running) begin
        if (cmp || cnt == '1) begin
          running  <= 1'b0;
          charge   <= 1'b0;
          done     <= 1'b1;
          data_out <= cnt;
          status   <= cmp && (cnt == ref_q);
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
