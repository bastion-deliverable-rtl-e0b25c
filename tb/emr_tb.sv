// Testbench of the Error-code/Mask register: mask set at reset, capture of {mask, code}
// read code-LSB first, update of the mask only, and clear high exactly while shifting
// selected.
module emr_tb;
  import ijtag_pkg::*;
  logic tck = 0, trst_n = 0, sel = 1, scan_in = 0, scan_out, mask, clear;
  logic [1:0] code_in = 2'b10;
  scan_ctl_t ctl = '0;
  always #5 tck = ~tck;
  emr #(.CODE_W(2)) dut (.tck, .trst_n, .ctl, .sel, .si(scan_in), .so(scan_out), .code_in,
    .mask, .clear);
  `include "scan_drv.svh"
  int checks = 0, failures = 0, clear_cycles = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  always @(posedge tck) if (clear) clear_cycles++;
  logic ib [], ob [];
  initial begin
    #12 trst_n = 1;
    check(mask == 1, "masked at reset");
    capture_cycle(); ib = '{1, 1, 0}; shift_bits(3, ib, ob);
    check(ob[0] == 0 && ob[1] == 1 && ob[2] == 1, "code LSB first, then mask");
    check(clear_cycles == 3, $sformatf("clear during 3 shifts (got %0d)", clear_cycles));
    update_cycle(); #1;
    check(mask == 0, "mask written from last bit in");
    code_in = 2'b01;
    capture_cycle(); ib = '{0, 0, 1}; shift_bits(3, ib, ob);
    check(ob[0] == 1 && ob[1] == 0 && ob[2] == 0, "new code and mask 0 captured");
    update_cycle(); #1;
    check(mask == 1, "mask set again");
    sel = 0; clear_cycles = 0;
    capture_cycle(); ib = '{0, 0, 0}; shift_bits(3, ib, ob); update_cycle();
    check(clear_cycles == 0 && mask == 1, "no clear and no update when unselected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
