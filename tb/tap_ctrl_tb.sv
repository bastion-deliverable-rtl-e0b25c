// Testbench of the TAP controller: walks scripted TMS sequences through both branches and
// checks every state against a hand-written expected list, checks the capture/shift/update
// decodes, and checks on a random walk that five TMS ones always reach Test-Logic-Reset.
module tap_ctrl_tb;
  import ijtag_pkg::*;
  logic tck = 0, trst_n = 0, tms = 1;
  tap_state_e state;
  scan_ctl_t ctl;
  tap_ctrl dut (.tck, .trst_n, .tms, .state, .ctl);
  always #5 tck = ~tck;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic step(input logic t, input tap_state_e exp);
    tms = t; @(posedge tck); #1;
    check(state == exp, $sformatf("expected %s got %s", exp.name(), state.name()));
  endtask
  initial begin
    #12 check(state == TAP_TLR && ctl.reset, "TRST gives Test-Logic-Reset");
    trst_n = 1;
    step(1, TAP_TLR); step(0, TAP_RTI); step(0, TAP_RTI); step(1, TAP_SEL_DR);
    step(0, TAP_CAP_DR); check(ctl.capture && !ctl.shift, "capture decode");
    step(0, TAP_SHIFT_DR); check(ctl.shift && !ctl.capture, "shift decode");
    step(0, TAP_SHIFT_DR); step(1, TAP_EXIT1_DR); step(0, TAP_PAUSE_DR); step(0, TAP_PAUSE_DR);
    step(1, TAP_EXIT2_DR); step(0, TAP_SHIFT_DR); step(1, TAP_EXIT1_DR); step(1, TAP_UPD_DR);
    check(ctl.update && !ctl.shift, "update decode");
    step(1, TAP_SEL_DR); step(1, TAP_SEL_IR); step(0, TAP_CAP_IR);
    check(!ctl.capture, "IR capture is not a DR capture");
    step(0, TAP_SHIFT_IR); step(1, TAP_EXIT1_IR); step(0, TAP_PAUSE_IR); step(1, TAP_EXIT2_IR);
    step(1, TAP_UPD_IR); step(0, TAP_RTI); step(1, TAP_SEL_DR); step(1, TAP_SEL_IR);
    step(1, TAP_TLR);
    for (int r = 0; r < 50; r++) begin
      repeat ($urandom_range(1, 12)) begin tms = 1'($urandom); @(posedge tck); end
      repeat (5) begin tms = 1; @(posedge tck); end
      #1 check(state == TAP_TLR, "five ones reach Test-Logic-Reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
