// Shared testbench helpers: drive a scan_ctl_t bundle directly (no TAP) on the falling TCK
// edge, so the cells see stable controls at the rising edge.
// capture_cycle(): one Capture-DR cycle. shift_bits(): shifts in[0..n-1] (in[0] first) and
// returns the bits seen on so before each shift edge. update_cycle(): one Update-DR cycle.
task automatic capture_cycle();
  @(negedge tck); ctl = '0; ctl.capture = 1;
  @(negedge tck); ctl = '0;
endtask
task automatic update_cycle();
  @(negedge tck); ctl = '0; ctl.update = 1;
  @(negedge tck); ctl = '0;
endtask
task automatic shift_bits(input int n, input logic in_bits [], output logic out_bits []);
  out_bits = new[n];
  for (int i = 0; i < n; i++) begin
    @(negedge tck); ctl = '0; ctl.shift = 1; scan_in = in_bits[i];
    #1 out_bits[i] = scan_out;
  end
  @(negedge tck); ctl = '0;
endtask
