// Testbench of the ADC-BIST engine with the capacitor-network stand-in. For a set of
// configurations it works out the count the engine must reach from the stand-in's delay
// rule (the cycle cmp is seen, counted from the cycle after start), checks done, status and
// data_out for a correct and a wrong reference, checks the run time in cycles, that an
// aged configuration fails, and that interrupt aborts a run.
module adc_bist_tb;
  logic clk = 0, rst = 1, interrupt = 0, start = 0, done, status, charge, cmp;
  logic [13:0] cap_data = '0, cap_cfg;
  logic [15:0] counter_ref = '0, data_out;
  int unsigned aging = 0;
  always #5 clk = ~clk;
  adc_bist dut (.clk, .rst, .interrupt, .start, .cap_data, .counter_ref, .done, .status,
    .data_out, .cap_cfg, .charge, .cmp);
  adc_cap_model u_cap (.clk, .cap_cfg, .charge, .aging, .cmp);
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  // expected count: cmp rises at the clk edge where the model's counter reaches delay-1,
  // the engine sees it one cycle later
  function automatic int exp_count(input logic [13:0] cfg, input int unsigned ag);
    return 20 + (int'(cfg) % 97) * 3 + (cfg[0] ? int'(ag) : 0);
  endfunction
  task automatic run(input logic [13:0] cfg, input logic [15:0] rf, output int cycles);
    @(negedge clk); cap_data = cfg; counter_ref = rf; start = 1;
    cycles = 0;
    @(negedge clk); start = 0;
    while (!done && cycles < 2000) begin @(negedge clk); cycles++; end
  endtask
  initial begin
    int cyc, e;
    logic [13:0] cfgs [6] = '{14'd4, 14'd10, 14'd96, 14'd150, 14'd7, 14'd3001};
    #22 rst = 0;
    foreach (cfgs[i]) begin
      e = exp_count(cfgs[i], 0);
      run(cfgs[i], 16'(e), cyc);
      check(done && status && data_out == 16'(e), $sformatf("cfg %0d pass, count %0d exp %0d", cfgs[i], data_out, e));
      check(cyc == e + 1, $sformatf("run time %0d cycles exp %0d", cyc, e + 1));
      run(cfgs[i], 16'(e + 1), cyc);
      check(done && !status, "wrong reference fails");
    end
    aging = 5;
    run(14'd7, 16'(exp_count(14'd7, 0)), cyc);
    check(done && !status && data_out == 16'(exp_count(14'd7, 5)), "aged configuration fails with longer count");
    run(14'd4, 16'(exp_count(14'd4, 0)), cyc);
    check(done && status, "even configuration unaffected");
    // interrupt aborts
    @(negedge clk); cap_data = 14'd90; counter_ref = 16'd0; start = 1;
    @(negedge clk); start = 0;
    repeat (10) @(negedge clk);
    interrupt = 1; @(negedge clk); interrupt = 0;
    repeat (400) @(negedge clk);
    check(!done && !charge, "interrupt aborts the run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
