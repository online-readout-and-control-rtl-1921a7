// trigger_control: trigger bits, sequence starts and event counting.
//
// Connects the experiment's trigger signals to the sequencer and keeps the
// trigger-related status bits:
//  * 1st-level trigger: freezes (halts) a running scan sequence.
//  * 2nd-level trigger (the event): counts the 32-bit event counter, sets
//    "2nd-level prompt" and "2nd-level delayed", drops Front-End Ready and
//    starts the readout sequence. "Delayed" stays on until a VME command
//    clears it after the raw data have been read out; a 2nd-level trigger
//    arriving while it is on is held pending and its readout sequence is
//    started when the command clears the bit, so a second event never
//    overwrites the first in the raw data memory.
//  * Sequencer stop (SQD15) at the end of the front-end readout: sets
//    Front-End Ready and requests a VME interrupt.
//  * Fast Clear: clears prompt and the 3rd-level bits and starts the scan
//    sequence; if the front-end readout is still running, the start waits
//    for its end.
//  * 3rd-level keep only sets its status bit; 3rd-level reject interrupts a
//    running readout and restarts the scan sequence.
// External trigger inputs are synchronised (two flops) and acted on at their
// rising edge. Every input has its enable/disable bit from control registers
// 1 and 2. Outputs `start_scan`, `start_ro`, `halt` are one-clock pulses.
// The behaviour of prompt/delayed/Front-End Ready, the stop bit, the keep
// and reject rules and the event counter follow the published timing
// description. What the 1st-level trigger and the "automatic 1st-level
// trigger sequence" bit do, deferring a Fast Clear during the front-end
// readout, and the run gating are this design's reading.
module trigger_control (
  input  logic        clk,
  input  logic        rst,
  // experiment trigger signals (asynchronous)
  input  logic        l1_in,
  input  logic        l2_in,
  input  logic        fc_in,
  input  logic        l3keep_in,
  input  logic        l3rej_in,
  input  logic        run_in,
  // control register bits
  input  logic        int_run,
  input  logic        ext_run_dis,
  input  logic        ext_fc_dis,
  input  logic        fer_en,
  input  logic        ext_l1_dis,
  input  logic        auto_l1,
  input  logic        l3rej_dis,
  input  logic        l3keep_dis,
  // VME commands (one-clock pulses)
  input  logic        cmd_reset_delayed,
  input  logic        cmd_soft_trigger,
  input  logic        cmd_start_scan,
  input  logic        cmd_start_ro,
  input  logic        cmd_stop,
  input  logic        cmd_clear_irq,
  input  logic        iack_done,
  input  logic        ev_we,
  input  logic [31:0] ev_wdata,
  // sequencer
  input  logic        seq_stopped,
  output logic        start_scan,
  output logic        start_ro,
  output logic        halt,
  // status
  output logic        l2_prompt,
  output logic        l2_delayed,
  output logic        l2_keep,
  output logic        fe_ready,
  output logic        fe_ready_out,
  output logic        l3_keep,
  output logic        l3_rej,
  output logic        irq_req,
  output logic        ro_active,
  output logic        run,
  output logic [31:0] event_count
);
  logic [2:0] s_l1, s_l2, s_fc, s_k3, s_r3;
  logic [1:0] s_run;
  logic       l1_e, l2_e, fc_e, k3_e, r3_e;
  logic       l1, l2, fc, k3, r3;
  logic       pending, fc_pending;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_l1 <= '0; s_l2 <= '0; s_fc <= '0; s_k3 <= '0; s_r3 <= '0; s_run <= '0;
    end else begin
      s_l1  <= {s_l1[1:0], l1_in};
      s_l2  <= {s_l2[1:0], l2_in};
      s_fc  <= {s_fc[1:0], fc_in};
      s_k3  <= {s_k3[1:0], l3keep_in};
      s_r3  <= {s_r3[1:0], l3rej_in};
      s_run <= {s_run[0], run_in};
    end
  end

  assign l1_e = s_l1[1] && !s_l1[2];
  assign l2_e = s_l2[1] && !s_l2[2];
  assign fc_e = s_fc[1] && !s_fc[2];
  assign k3_e = s_k3[1] && !s_k3[2];
  assign r3_e = s_r3[1] && !s_r3[2];

  assign run     = int_run || (s_run[1] && !ext_run_dis);
  assign l2_keep = s_l2[1];
  assign l1 = run && ((l1_e && !ext_l1_dis) || (cmd_soft_trigger && auto_l1));
  assign l2 = run && (l2_e || cmd_soft_trigger);
  assign fc = fc_e && !ext_fc_dis;
  assign k3 = k3_e && !l3keep_dis;
  assign r3 = r3_e && !l3rej_dis;

  assign fe_ready_out = fe_ready && fer_en;

  always_ff @(posedge clk) begin
    if (rst) begin
      l2_prompt   <= 1'b0;
      l2_delayed  <= 1'b0;
      fe_ready    <= 1'b1;
      l3_keep     <= 1'b0;
      l3_rej      <= 1'b0;
      irq_req     <= 1'b0;
      ro_active   <= 1'b0;
      pending     <= 1'b0;
      fc_pending  <= 1'b0;
      start_scan  <= 1'b0;
      start_ro    <= 1'b0;
      halt        <= 1'b0;
      event_count <= '0;
    end else begin
      start_scan <= cmd_start_scan;
      start_ro   <= cmd_start_ro;
      halt       <= cmd_stop || (l1 && !ro_active);

      if (ev_we) event_count <= ev_wdata;
      else if (l2) event_count <= event_count + 1'b1;

      // 2nd-level trigger
      if (l2) begin
        l2_prompt <= 1'b1;
        fe_ready  <= 1'b0;
        if (!l2_delayed) begin
          l2_delayed <= 1'b1;
          ro_active  <= 1'b1;
          start_ro   <= 1'b1;
          halt       <= 1'b0;
        end else begin
          pending <= 1'b1;
        end
      end

      // end of the raw data transfer over VME
      if (cmd_reset_delayed && !l2) begin
        if (pending) begin
          pending   <= 1'b0;
          ro_active <= 1'b1;
          fe_ready  <= 1'b0;
          start_ro  <= 1'b1;
        end else begin
          l2_delayed <= 1'b0;
        end
      end

      // front-end readout finished (stop bit)
      if (seq_stopped && ro_active && !start_ro) begin
        ro_active <= 1'b0;
        fe_ready  <= 1'b1;
        irq_req   <= 1'b1;
        if (fc_pending) begin
          fc_pending <= 1'b0;
          start_scan <= 1'b1;
        end
      end

      // Fast Clear
      if (fc) begin
        l2_prompt <= 1'b0;
        l3_keep   <= 1'b0;
        l3_rej    <= 1'b0;
        if (ro_active && !(seq_stopped && !start_ro)) fc_pending <= 1'b1;
        else start_scan <= 1'b1;
      end

      // 3rd-level trigger
      if (k3) l3_keep <= 1'b1;
      if (r3) begin
        l3_rej <= 1'b1;
        if (ro_active) begin
          ro_active  <= 1'b0;
          l2_delayed <= pending;
          pending    <= 1'b0;
          fe_ready   <= 1'b1;
          fc_pending <= 1'b0;
          start_scan <= 1'b1;
          start_ro   <= 1'b0;
        end
      end

      if (iack_done || cmd_clear_irq) irq_req <= 1'b0;
    end
  end
endmodule
