// Testbench of the trigger logic: every start, stop and re-arm mode, with the cycle at
// which trigger rises and falls measured against the configured delays.
module trigger_logic_tb;
  import trig_pkg::*;
  logic clk = 0, rst_n = 0, arm = 0, clear = 0, trig_src = 0, instr_done = 0, trigger, armed;
  trig_cfg_t cfg;
  always #5 clk = ~clk;
  trigger_logic dut (.clk, .rst_n, .cfg, .arm, .clear, .trig_src, .instr_done, .trigger, .armed);
  int checks = 0, failures = 0, cyc = 0, rise_cyc = -1, fall_cyc = -1, executions = 0;
  int mode_hits [string];
  logic trig_q = 0;
  always @(posedge clk) begin
    #1 cyc++;
    if (trigger && !trig_q) begin rise_cyc = cyc; executions++; end
    if (!trigger && trig_q) fall_cyc = cyc;
    trig_q = trigger;
  end
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic setcfg(input start_mode_e sm, input stop_mode_e pm, input rearm_mode_e rm,
                        input int sd, input int pd, input int rd);
    cfg.start_mode = sm; cfg.stop_mode = pm; cfg.rearm_mode = rm;
    cfg.start_delay = 16'(sd); cfg.stop_delay = 16'(pd); cfg.rearm_delay = 16'(rd);
  endtask
  task automatic pulse_arm(); @(negedge clk) arm = 1; @(negedge clk) arm = 0; endtask
  // raise the source at a negedge; returns the cycle number of the edge that samples it
  task automatic src(input logic v, output int edge_cyc);
    @(negedge clk) trig_src = v; edge_cyc = cyc + 1;
  endtask
  initial begin
    int e, e2;
    setcfg(START_DIRECT, STOP_TRIGGERED, REARM_SINGLE, 0, 0, 0);
    #22 rst_n = 1;
    check(!armed, "disarmed after reset");
    src(1, e); repeat (3) @(negedge clk); src(0, e);
    check(executions == 0, "no execution while disarmed");
    // direct start, triggered stop, single shot
    pulse_arm(); check(armed, "armed by command");
    src(1, e); repeat (4) @(negedge clk);
    check(rise_cyc == e, $sformatf("direct start at sampling edge (%0d vs %0d)", rise_cyc, e));
    src(0, e2); repeat (2) @(negedge clk);
    check(fall_cyc == e2 && !armed, "triggered stop, single shot disarms");
    mode_hits["direct"]++; mode_hits["triggered"]++; mode_hits["single"]++;
    src(1, e); repeat (3) @(negedge clk); src(0, e);
    check(executions == 1, "single shot does not re-execute");
    // delayed start 5, delayed stop 7, auto re-arm
    setcfg(START_DELAYED, STOP_TRIG_DELAYED, REARM_AUTO, 5, 7, 0);
    pulse_arm();
    src(1, e); repeat (8) @(negedge clk);
    check(rise_cyc == e + 5, $sformatf("delayed start (+%0d)", rise_cyc - e));
    src(0, e2); repeat (10) @(negedge clk);
    check(fall_cyc == e2 + 7, $sformatf("delayed stop (+%0d)", fall_cyc - e2));
    check(armed, "auto re-armed");
    src(1, e); repeat (8) @(negedge clk); src(0, e2); repeat (10) @(negedge clk);
    check(executions == 3, "second execution after auto re-arm");
    mode_hits["delayed"]++; mode_hits["trig_delayed"]++; mode_hits["auto"]++;
    // manual deactivation
    setcfg(START_DIRECT, STOP_MANUAL, REARM_AUTO, 0, 0, 0);
    src(1, e); repeat (3) @(negedge clk); src(0, e2); repeat (10) @(negedge clk);
    check(trigger, "manual: active after source drops");
    @(negedge clk) clear = 1; @(negedge clk) clear = 0; @(negedge clk);
    check(!trigger, "manual: cleared by command");
    mode_hits["manual"]++;
    // self deactivation, delayed re-arm 10
    setcfg(START_DIRECT, STOP_SELF, REARM_DELAYED, 0, 0, 10);
    src(1, e); @(negedge clk); src(0, e2); repeat (5) @(negedge clk);
    check(trigger, "self: active until instrument done");
    @(negedge clk) instr_done = 1; @(negedge clk) instr_done = 0;
    e = cyc;
    check(!trigger && !armed, "self: stopped, re-arm pending");
    src(1, e2); repeat (2) @(negedge clk); src(0, e2);
    check(executions == 5, "source ignored during re-arm delay");
    repeat (12) @(negedge clk);
    check(armed, "re-armed after delay");
    src(1, e2); repeat (2) @(negedge clk);
    check(executions == 6, "executes after delayed re-arm");
    mode_hits["self"]++; mode_hits["delayed_rearm"]++;
    check(mode_hits.num() == 9, "all nine modes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
