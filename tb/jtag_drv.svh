// Shared testbench helpers: drive a TAP through tck/tms/tdi/tdo like an external tester.
// TMS and TDI change on the falling TCK edge. tap_reset(): five TMS ones, then Run-Test/Idle.
// dr_scan(): Run-Test/Idle -> Select-DR -> Capture-DR -> n x Shift-DR -> Exit1 -> Update ->
// Run-Test/Idle; in[0] is shifted in first and out[i] is TDO before the i-th shift edge.
// shift_count counts Shift-DR cycles.
int shift_count = 0;
task automatic tms_step(input logic t);
  @(negedge tck); tms = t;
endtask
task automatic tap_reset();
  repeat (5) tms_step(1);
  tms_step(0);
endtask
task automatic dr_scan(input int n, input logic in_bits [], output logic out_bits []);
  out_bits = new[n];
  tms_step(1);            // -> Select-DR
  tms_step(0);            // -> Capture-DR
  tms_step(0);            // -> Shift-DR
  for (int i = 0; i < n; i++) begin
    @(negedge tck); tms = (i == n - 1); tdi = in_bits[i];
    #1 out_bits[i] = tdo;
    shift_count++;
  end
  tms_step(1);            // Exit1 -> Update-DR
  tms_step(0);            // -> Run-Test/Idle
  @(negedge tck);
endtask
