// Fault-flag logic of a fault-monitoring instrument.
//
// A detector inside the instrument pulses 'fault' together with an error code. The flag is
// set and the code stored; the flag then stays high until the network acknowledges it with
// 'clear' (its EMR is being shifted). While a flag is pending further faults are ignored and
// the first code is kept. While 'mask' is high the monitor neither records faults nor
// raises its flag, which keeps a permanent fault from reconfiguring the network again and
// again. flag goes to the 'open' terminal of the monitor's modified SIB, code to its EMR.
// Clocked by the instrument clock clk; clear comes from the TCK domain and is at least
// CODE_W+1 TCK cycles long, so clk must be at least as fast as TCK (this design's choice).
module fault_monitor #(
  parameter int unsigned CODE_W = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fault,
  input  logic [CODE_W-1:0] fault_code,
  input  logic              mask,
  input  logic              clear,
  output logic              flag,
  output logic [CODE_W-1:0] code
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      flag <= 1'b0;
      code <= '0;
    end else if (mask) begin
      flag <= 1'b0;
    end else if (clear) begin
      flag <= 1'b0;
    end else if (fault && !flag) begin
      flag <= 1'b1;
      code <= fault_code;
    end
  end

endmodule
