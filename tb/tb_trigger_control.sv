// tb_trigger_control: self-checking test of the trigger logic.
//
// Walks through the two-event timing of the readout: a 2nd-level trigger
// starting the readout, the stop bit raising Front-End Ready and the
// interrupt, a second trigger held pending while "delayed" is on and
// started by the VME reset command, a Fast Clear deferred until the end of
// the front-end readout, 3rd-level keep and reject, 1st-level freeze, the
// enable/disable bits, run gating and the event counter. Start and halt
// pulses are counted by monitors and compared with the expected numbers.
module tb_trigger_control;
  logic clk = 1'b0, rst = 1'b1;
  logic l1_in = 0, l2_in = 0, fc_in = 0, l3keep_in = 0, l3rej_in = 0, run_in = 0;
  logic int_run = 1, ext_run_dis = 0, ext_fc_dis = 0, fer_en = 1, ext_l1_dis = 0, auto_l1 = 0;
  logic l3rej_dis = 0, l3keep_dis = 0;
  logic cmd_reset_delayed = 0, cmd_soft_trigger = 0, cmd_start_scan = 0, cmd_start_ro = 0;
  logic cmd_stop = 0, cmd_clear_irq = 0, iack_done = 0, ev_we = 0;
  logic [31:0] ev_wdata = '0;
  logic seq_stopped = 0;
  logic start_scan, start_ro, halt;
  logic l2_prompt, l2_delayed, l2_keep, fe_ready, fe_ready_out, l3_keep, l3_rej, irq_req;
  logic ro_active, run;
  logic [31:0] event_count;
  int checks = 0, failures = 0;
  int n_scan = 0, n_ro = 0, n_halt = 0;

  trigger_control dut (.*);
  always #5 clk = ~clk;

  always @(posedge clk) if (!rst) begin
    n_scan += int'(start_scan); n_ro += int'(start_ro); n_halt += int'(halt);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic pulse_in(ref logic s);
    s = 1'b1; repeat (3) @(posedge clk); s = 1'b0; repeat (4) @(posedge clk);
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1'b1; @(negedge clk); s = 1'b0; repeat (2) @(posedge clk);
  endtask

  task automatic counts(input int sc, input int ro, input int hl, input string msg);
    @(negedge clk);
    check(n_scan == sc && n_ro == ro && n_halt == hl,
          $sformatf("%s: starts scan %0d ro %0d halt %0d, expected %0d %0d %0d",
                    msg, n_scan, n_ro, n_halt, sc, ro, hl));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(fe_ready && fe_ready_out && !l2_delayed, "reset state");
    // Fast Clear when idle: scan starts at once
    pulse_in(fc_in);
    counts(1, 0, 0, "fast clear idle");
    // 1st-level trigger freezes the scan
    pulse_in(l1_in);
    counts(1, 0, 1, "L1 halt");
    // event 1
    pulse_in(l2_in);
    counts(1, 1, 1, "L2 starts readout");
    check(event_count == 1 && l2_prompt && l2_delayed && !fe_ready && ro_active,
          "bits after L2");
    // fast clear during the front-end readout is deferred
    pulse_in(fc_in);
    counts(1, 1, 1, "fast clear deferred");
    check(!l2_prompt, "prompt cleared by fast clear");
    pulse(seq_stopped);
    counts(2, 1, 1, "deferred scan after stop");
    check(fe_ready && irq_req && !ro_active && l2_delayed, "stop bit: FE ready, irq, still delayed");
    pulse(iack_done);
    check(!irq_req, "irq released by acknowledge");
    // event 2 while event 1 is read over VME
    pulse_in(l2_in);
    counts(2, 1, 1, "second event held");
    check(event_count == 2 && !fe_ready && l2_prompt, "second event bits");
    pulse(cmd_reset_delayed);
    counts(2, 2, 1, "second readout after VME reset");
    check(l2_delayed && ro_active, "delayed again for event 2");
    // 3rd-level keep and reject
    pulse_in(l3keep_in);
    check(l3_keep, "L3 keep bit");
    pulse_in(l3rej_in);
    counts(3, 2, 1, "reject restarts scan");
    check(l3_rej && !ro_active && fe_ready, "reject aborts readout");
    pulse(cmd_reset_delayed);
    check(!l2_delayed, "delayed reset");
    // disables
    ext_fc_dis = 1; l3keep_dis = 1; ext_l1_dis = 1;
    pulse_in(fc_in); pulse_in(l1_in);
    counts(3, 2, 1, "disabled fast clear and L1");
    ext_fc_dis = 0;
    pulse_in(fc_in);
    check(!l3_keep, "keep cleared by fast clear");
    pulse_in(l3keep_in);
    check(!l3_keep, "keep disabled");
    // run gating
    int_run = 0; ext_run_dis = 1; run_in = 1; repeat (3) @(posedge clk);
    pulse_in(l2_in);
    check(event_count == 2, "no event without run");
    ext_run_dis = 0; repeat (3) @(posedge clk);
    check(run, "external run");
    // software trigger with automatic L1
    auto_l1 = 1;
    pulse(cmd_soft_trigger);
    counts(4, 3, 1, "software trigger");
    check(event_count == 3, "event counted");
    pulse(seq_stopped);
    // event counter load, commands
    @(negedge clk); ev_wdata = 32'hFFFF_FFFF; ev_we = 1; @(negedge clk); ev_we = 0;
    check(event_count == 32'hFFFF_FFFF, "counter load");
    pulse(cmd_clear_irq);
    check(!irq_req, "clear irq command");
    pulse(cmd_start_scan); pulse(cmd_stop);
    counts(5, 3, 2, "commands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
