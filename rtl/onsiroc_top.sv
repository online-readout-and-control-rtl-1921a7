// onsiroc_top: digital core of the VME readout and control module for
// silicon strip detectors.
//
// Four parallel input channels digitise the serial analogue output of up to
// 2048 strips each. For every strip the fine pedestal of the right pipeline
// cell is sent to the analogue adder (`fine_code`), the FADC result
// (`adc_data`, 12 bits + overflow) is stored in the raw data memory and, at
// the same time, compared with a threshold to find clusters, which are
// listed in the pointer memory. A microprogrammed sequencer drives the
// front-end chips (four complementary control lines) and the board itself
// (conversion strobes, counter clears) in a scan phase and a readout phase;
// the trigger logic starts these phases from the experiment's triggers. A
// VME slave gives access to every memory, counter and register, and raises
// an interrupt when an event is ready. Twelve overload cut-offs switch the
// front-end and bias supplies.
//
// Clocking: everything runs on `clk`. The sequencer makes one step every
// STEP_DIV clocks (internal clock) or per `ext_clk` period. With the
// defaults, clk = 80 MHz and STEP_DIV = 8 give a 10 MHz sequencer, i.e. two
// steps per sample at 5 MSps; the fast board clock keeps the VME data
// strobe to DTACK delay at five clocks (62.5 ns).
//
// Local address map (4 MB window, byte addresses):
//   0x000000 sequencer memory, 128K x 32
//   0x100000 pedestal memories: channel in A19..18, {cell, strip} in A17..2
//   0x200000 raw data: A13 = channel pair, A12..2 = strip; a 32-bit word is
//            {even channel sample, odd channel sample}, 16 bits each
//   0x280000 pointer memories: channel in A14..13, index in A12..2,
//            data {first strip [22:12], width [11:0]}
//   0x300000 registers (see onsiroc_pkg), counters at word 64 + 4*ch + k
// The analogue branch, DACs, FADC, supplies and connectors are outside this
// module; their digital signals are its ports. The interrupt level field
// of CR1 has two bits, so of the seven IRQ outputs only 1..3 are ever
// driven; lines 4..7 are kept as ports so the interrupter stays general.
module onsiroc_top
  import onsiroc_pkg::*;
#(
  parameter int unsigned STEP_DIV  = 8,
  parameter int unsigned DELAY     = 4,
  parameter int unsigned MM1_TICKS = 1200,
  parameter int unsigned MM2_TICKS = 80000
) (
  input  logic        clk,
  input  logic        rst,
  // VME
  input  logic        vme_as_n,
  input  logic [1:0]  vme_ds_n,
  input  logic        vme_write_n,
  input  logic        vme_lword_n,
  input  logic [5:0]  vme_am,
  input  logic [31:1] vme_a,
  input  logic [31:0] vme_d_in,
  output logic [31:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  input  logic        vme_iack_n,
  input  logic        vme_iackin_n,
  output logic        vme_iackout_n,
  output logic [7:1]  vme_irq_n,
  input  logic [1:0]  base_a24,
  input  logic [9:0]  base_a32,
  // experiment trigger system
  input  logic        trig_l1,
  input  logic        trig_l2,
  input  logic        trig_fast_clear,
  input  logic        trig_l3_keep,
  input  logic        trig_l3_reject,
  input  logic        trig_run,
  input  logic        ext_clk,
  output logic        fe_ready,
  // analogue branch, DACs and FADC
  input  logic [N_CH-1:0][SAMPLE_W-1:0] adc_data,
  output logic                          adc_convert,
  output logic [N_CH-1:0][PED_W-1:0]    fine_code,
  output logic [N_CH-1:0][PED_W-1:0]    coarse_code,
  output logic [N_CH-1:0]               input_enable,
  // front-end control connector
  output logic [3:0]  control,
  output logic [3:0]  control_n,
  output logic [2:0]  sqd_ext,
  // power supplies
  input  logic [N_SUPPLIES-1:0]         reg_sw,
  output logic [N_SUPPLIES-1:0]         reg_on,
  output logic [N_CH-1:0][PED_W-1:0]    bias_code
);
  // ---------------- local bus -------------------------------------------
  lbus_req_t lreq;
  lbus_rsp_t lrsp;
  logic      iack_done;

  logic [15:0] cr1, cr2, status;
  logic [7:0]  cmd;
  logic        ev_we;
  logic [31:0] ev_wdata, event_count;
  logic [15:0] scan_addr, ro_addr;
  logic [SEQ_AW-1:0] test_addr, seq_pc;
  logic [N_CH-1:0][ADC_BITS-1:0] threshold;
  logic [N_CH-1:0][WIDTH_W-1:0]  min_width;
  logic [N_SUPPLIES-1:0] ps_enable, ps_trip;
  logic [2:0]  irq_level;
  logic [7:0]  irq_vector;

  // sequencer and trigger signals
  logic [15:0] sqd;
  logic        stb, seq_running, seq_scan, seq_ro, seq_stopped;
  logic        start_scan, start_ro, halt;
  logic        l2_prompt, l2_delayed, l2_keep, fe_ready_int, l3_keep, l3_rej;
  logic        irq_req, ro_active, run;

  // channels
  logic [N_CH-1:0]             ch_v_en;
  logic [N_CH-1:0][1:0]        ch_v_sel;
  logic [N_CH-1:0][15:0]       ch_v_addr;
  logic [N_CH-1:0][31:0]       ch_v_wdata, ch_v_rdata;
  logic [N_CH-1:0]             ch_v_we;
  logic [N_CH-1:0][STRIP_W:0]  n_clusters, n_hits;
  logic [N_CH-1:0]             ch_busy;

  vme_slave u_vme (
    .clk, .rst,
    .as_n(vme_as_n), .ds_n(vme_ds_n), .write_n(vme_write_n), .lword_n(vme_lword_n),
    .am(vme_am), .a(vme_a), .d_in(vme_d_in), .d_out(vme_d_out), .d_oe(vme_d_oe),
    .dtack_n(vme_dtack_n), .iack_n(vme_iack_n), .iackin_n(vme_iackin_n),
    .iackout_n(vme_iackout_n), .irq_n(vme_irq_n),
    .base_a24, .base_a32,
    .irq_req, .irq_level, .irq_vector, .iack_done,
    .lreq, .lrsp
  );

  // ---------------- address decode ------------------------------------------
  logic [2:0] map;
  logic       sel_seq, sel_ped, sel_raw, sel_ptr, sel_reg, sel_cnt;
  logic [7:0] reg_off;
  logic       wr;

  assign map     = lreq.addr[21:19];
  assign reg_off = lreq.addr[9:2];
  assign wr      = lreq.req && lreq.we;
  assign sel_seq = (map == MAP_SEQ);
  assign sel_ped = (map == MAP_PED) || (map == MAP_PED2);
  assign sel_raw = (map == MAP_RAW);
  assign sel_ptr = (map == MAP_PTR);
  assign sel_cnt = (map == MAP_REG) && reg_off >= 8'(R_CNT0) && reg_off < 8'(R_CNT0 + 4 * N_CH);
  assign sel_reg = (map == MAP_REG) && !sel_cnt;

  logic [31:0] seq_rdata, reg_rdata;

  always_comb begin
    for (int c = 0; c < N_CH; c++) begin
      ch_v_en[c]    = 1'b0;
      ch_v_we[c]    = lreq.we;
      ch_v_sel[c]   = 2'd0;
      ch_v_addr[c]  = '0;
      ch_v_wdata[c] = lreq.wdata;
      if (sel_ped) begin
        ch_v_en[c]   = lreq.req && lreq.addr[19:18] == 2'(c);
        ch_v_sel[c]  = 2'd0;
        ch_v_addr[c] = lreq.addr[17:2];
        ch_v_wdata[c] = lreq.wdata;
      end else if (sel_raw) begin
        // even channel in the upper half-word, odd channel in the lower one
        ch_v_en[c]   = lreq.req && lreq.addr[13] == 1'(c / 2) &&
                       (!lreq.we || ((c % 2 == 0) ? lreq.be[3] : lreq.be[0]));
        ch_v_sel[c]  = 2'd1;
        ch_v_addr[c] = 16'(lreq.addr[12:2]);
        ch_v_wdata[c] = (c % 2 == 0) ? 32'(lreq.wdata[31:16]) : 32'(lreq.wdata[15:0]);
      end else if (sel_ptr) begin
        ch_v_en[c]   = lreq.req && lreq.addr[14:13] == 2'(c);
        ch_v_sel[c]  = 2'd2;
        ch_v_addr[c] = 16'(lreq.addr[12:2]);
      end else if (sel_cnt) begin
        ch_v_en[c]   = lreq.req && ((reg_off - 8'(R_CNT0)) >> 2) == 8'(c);
        ch_v_sel[c]  = 2'd3;
        ch_v_addr[c] = 16'(reg_off[1:0]);
      end
    end
  end

  // response: every target answers one clock after the request
  logic       ack_q;
  logic [2:0] map_q;
  logic       cnt_q;
  logic [1:0] ch_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      ack_q <= 1'b0; map_q <= '0; cnt_q <= 1'b0; ch_q <= '0;
    end else begin
      ack_q <= lreq.req;
      if (lreq.req) begin
        map_q <= map;
        cnt_q <= sel_cnt;
        unique case (1'b1)
          sel_ped: ch_q <= lreq.addr[19:18];
          sel_raw: ch_q <= {lreq.addr[13], 1'b0};
          sel_ptr: ch_q <= lreq.addr[14:13];
          default: ch_q <= reg_off[3:2];
        endcase
      end
    end
  end

  always_comb begin
    lrsp.ack = ack_q;
    unique case (map_q)
      MAP_SEQ:            lrsp.rdata = seq_rdata;
      MAP_PED, MAP_PED2:  lrsp.rdata = ch_v_rdata[ch_q];
      MAP_RAW:            lrsp.rdata = {ch_v_rdata[ch_q][15:0], ch_v_rdata[ch_q | 2'd1][15:0]};
      MAP_PTR:            lrsp.rdata = ch_v_rdata[ch_q];
      MAP_REG:            lrsp.rdata = cnt_q ? ch_v_rdata[ch_q] : reg_rdata;
      default:            lrsp.rdata = '0;
    endcase
  end

  // ---------------- registers -------------------------------------------
  control_registers u_regs (
    .clk, .rst,
    .en(lreq.req && sel_reg), .we(lreq.we), .be(lreq.be), .addr(reg_off),
    .wdata(lreq.wdata), .rdata(reg_rdata),
    .seq_running, .scan_on(seq_scan), .l2_prompt, .l2_delayed,
    .fe_ready(fe_ready_int), .irq_on(irq_req), .l2_keep, .l3_keep, .l3_rej,
    .ps_on(reg_on), .ps_trip, .event_count, .seq_pc, .n_clusters,
    .cr1, .cr2, .status, .cmd, .ev_we, .ev_wdata,
    .scan_addr, .ro_addr, .test_addr,
    .threshold, .min_width, .coarse_code, .bias_code,
    .ps_enable, .input_enable, .irq_level, .irq_vector
  );

  // ---------------- trigger logic and sequencer --------------------------------
  trigger_control u_trig (
    .clk, .rst,
    .l1_in(trig_l1), .l2_in(trig_l2), .fc_in(trig_fast_clear),
    .l3keep_in(trig_l3_keep), .l3rej_in(trig_l3_reject), .run_in(trig_run),
    .int_run(cr1[CR1_INT_RUN]), .ext_run_dis(cr1[CR1_EXT_RUN_DIS]),
    .ext_fc_dis(cr1[CR1_EXT_FC_DIS]), .fer_en(cr1[CR1_FER_EN]),
    .ext_l1_dis(cr1[CR1_EXT_L1_DIS]), .auto_l1(cr1[CR1_AUTO_L1]),
    .l3rej_dis(cr2[CR2_L3REJ_DIS]), .l3keep_dis(cr2[CR2_L3KEEP_DIS]),
    .cmd_reset_delayed(cmd[CMD_RESET_DELAYED]), .cmd_soft_trigger(cmd[CMD_SOFT_TRIGGER]),
    .cmd_start_scan(cmd[CMD_START_SCAN]), .cmd_start_ro(cmd[CMD_START_RO]),
    .cmd_stop(cmd[CMD_STOP_SEQ]), .cmd_clear_irq(cmd[CMD_CLEAR_IRQ]),
    .iack_done, .ev_we, .ev_wdata,
    .seq_stopped, .start_scan, .start_ro, .halt,
    .l2_prompt, .l2_delayed, .l2_keep, .fe_ready(fe_ready_int), .fe_ready_out(fe_ready),
    .l3_keep, .l3_rej, .irq_req, .ro_active, .run, .event_count
  );

  sequencer #(.STEP_DIV(STEP_DIV)) u_seq (
    .clk, .rst,
    .int_clk(cr1[CR1_INT_CLK]), .ext_clk,
    .start_scan, .start_ro, .start_test(cmd[CMD_START_TEST]), .halt,
    .scan_addr, .ro_addr, .test_addr,
    .p_en(lreq.req && sel_seq), .p_we(lreq.we), .p_addr(lreq.addr[SEQ_AW+1:2]),
    .p_wdata(lreq.wdata), .p_rdata(seq_rdata),
    .sqd, .stb, .running(seq_running), .scan_mode(seq_scan), .ro_mode(seq_ro),
    .stopped(seq_stopped), .pc(seq_pc)
  );

  logic s_convert, s_clear, s_cell_inc, s_cell_clr;
  assign s_convert  = stb && sqd[SQD_CONVERT];
  assign s_clear    = stb && sqd[SQD_CHCLEAR];
  assign s_cell_inc = stb && sqd[SQD_CELLINC];
  assign s_cell_clr = stb && sqd[SQD_CELLCLR];
  assign adc_convert = s_convert;

  assign control   = cr1[CR1_CTRL_EN] ? sqd[SQD_FE0 +: 4] : 4'b0000;
  assign control_n = ~control;
  assign sqd_ext   = sqd[SQD_EXT0 +: 3];

  // ---------------- input channels -------------------------------------------
  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    input_channel #(.DELAY(DELAY)) u_ch (
      .clk, .rst,
      .clear(s_clear), .step(s_convert), .cell_inc(s_cell_inc), .cell_clr(s_cell_clr),
      .ped_enable(cr1[CR1_PED_EN]), .threshold(threshold[c]), .min_width(min_width[c]),
      .adc_data(adc_data[c]), .fine_code(fine_code[c]),
      .v_en(ch_v_en[c]), .v_we(ch_v_we[c]), .v_sel(ch_v_sel[c]), .v_addr(ch_v_addr[c]),
      .v_wdata(ch_v_wdata[c]), .v_rdata(ch_v_rdata[c]),
      .n_clusters(n_clusters[c]), .n_hits(n_hits[c]), .busy(ch_busy[c])
    );
  end

  // ---------------- power supply overload cut-offs -------------------------------
  for (genvar s = 0; s < N_SUPPLIES; s++) begin : g_ps
    overload_protection #(.MM1_TICKS(MM1_TICKS), .MM2_TICKS(MM2_TICKS)) u_olp (
      .clk, .rst, .enable(ps_enable[s]), .reg_sw(reg_sw[s]),
      .reg_on(reg_on[s]), .tripped(ps_trip[s])
    );
  end

  // a write never goes to two targets
  a_one_target: assert property (@(posedge clk) disable iff (rst)
    wr |-> $onehot0({sel_seq, sel_ped, sel_raw, sel_ptr, sel_reg, sel_cnt}))
    else $error("onsiroc_top: overlapping address decode");
endmodule
