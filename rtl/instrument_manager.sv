// Instrument Manager (IM): turns the aggregated flags into an interrupt and runs the
// Update-delay calibration.
//
// The aggregated F (OR of all module F flags) and C (AND of all module C flags) arrive
// asynchronously and pass through 2-flip-flop synchronizers on the system clock. irq is
// high while a fault is flagged and not corrected (F = 1, C = 0).
//
// Calibration (after the tester set the CAL bit of one module, so its C drops to 0):
// cal_start moves IDLE -> WAIT00, which waits for the "illegal" F&C = 00 state. Then COUNT
// drives upd_cal high (a rising front on the Update net) and counts system clocks until
// C rises again; DONE holds the count and pulses cal_done. The count is the round trip of
// the Update front out to the instrument and of the C front back, plus the constant
// synchronizer latency of SYNC_LAT cycles, which cal_count does not remove. upd_cal drops
// again when cal_start is low in DONE.
//
// From the paper: steps 1-6 of the calibration procedure and the interrupt for an
// uncorrected error. Design choices: synchronizers, the counter width CNT_W and the
// handshake with cal_start.
module instrument_manager #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             f_agg,
  input  logic             c_agg,
  input  logic             cal_start,
  output logic             irq,
  output logic             upd_cal,
  output logic [CNT_W-1:0] cal_count,
  output logic             cal_done,
  output logic             cal_busy
);

  localparam int unsigned SYNC_LAT = 2;

  typedef enum logic [1:0] {IDLE, WAIT00, COUNT, DONE} state_e;
  state_e     state;
  logic [1:0] f_sync, c_sync;
  logic       f_s, c_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_sync <= '0;
      c_sync <= '1;
    end else begin
      f_sync <= {f_sync[0], f_agg};
      c_sync <= {c_sync[0], c_agg};
    end
  end
  assign f_s = f_sync[SYNC_LAT-1];
  assign c_s = c_sync[SYNC_LAT-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) irq <= 1'b0;
    else        irq <= f_s && !c_s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      upd_cal   <= 1'b0;
      cal_count <= '0;
      cal_done  <= 1'b0;
    end else begin
      cal_done <= 1'b0;
      unique case (state)
        IDLE: if (cal_start) state <= WAIT00;
        WAIT00: if (!f_s && !c_s) begin
          state     <= COUNT;
          upd_cal   <= 1'b1;
          cal_count <= '0;
        end
        COUNT: begin
          if (c_s) begin
            state    <= DONE;
            cal_done <= 1'b1;
          end else if (cal_count != '1) begin
            cal_count <= cal_count + 1'b1;
          end
        end
        DONE: if (!cal_start) begin
          state   <= IDLE;
          upd_cal <= 1'b0;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign cal_busy = (state != IDLE);

endmodule
