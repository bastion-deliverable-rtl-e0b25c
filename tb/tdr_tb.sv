// Testbench of the test data register: 5-bit register, checks capture, the order bits
// leave and enter, update and its strobe, that an unselected register holds, and reset.
module tdr_tb;
  import ijtag_pkg::*;
  logic tck = 0, trst_n = 0, sel = 1, scan_in = 0, scan_out, upd_strobe;
  logic [4:0] cap_in = 5'b10110, upd_out;
  scan_ctl_t ctl = '0;
  always #5 tck = ~tck;
  tdr #(.WIDTH(5), .RESET_VAL(5'b00011)) dut (.tck, .trst_n, .ctl, .sel, .si(scan_in),
    .so(scan_out), .cap_in, .upd_out, .upd_strobe);
  `include "scan_drv.svh"
  int checks = 0, failures = 0, strobes = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge tck) if (upd_strobe) strobes++;
  logic ib [], ob [];
  initial begin
    #12 trst_n = 1;
    strobes = 0;
    check(upd_out == 5'b00011, "reset value");
    capture_cycle(); ib = '{1, 0, 0, 1, 1}; shift_bits(5, ib, ob);
    check(ob[0] == 0 && ob[1] == 1 && ob[2] == 1 && ob[3] == 0 && ob[4] == 1, "capture, LSB first");
    update_cycle(); #1;
    check(upd_out == 5'b11001, "update value (first bit in is bit 0)");
    @(posedge tck); #1;
    check(strobes == 1, "one update strobe");
    sel = 0; capture_cycle(); ib = '{0, 0, 0, 0, 0}; shift_bits(5, ib, ob); update_cycle();
    check(upd_out == 5'b11001 && strobes == 1, $sformatf("unselected holds %b %0d", upd_out, strobes));
    sel = 1; @(negedge tck) ctl.reset = 1; @(negedge tck) ctl = '0;
    check(upd_out == 5'b00011, "TLR reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
