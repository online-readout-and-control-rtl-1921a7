// tb_onsiroc_top: end-to-end test of the readout and control module at its
// default sizes (4 channels x 2048 strips, 128K sequencer words, 80 MHz
// board clock, 10 MHz sequencer steps, two steps per sample = 5 MSps).
//
// A VME master configures the board, loads a scan program (endless loop
// advancing the pipeline cell counter) and a fully unrolled readout program
// (clear, 2048 + 4 conversions, stop) into the sequencer memory, and loads
// the pedestals of the frozen pipeline cell. Four behavioural analogue paths
// deliver pedestals plus random clustered signals. The test then runs:
//   scan phase -> 1st-level freeze -> 2nd-level trigger -> front-end
//   readout (its duration is checked against the 410 us of the board) ->
//   stop bit, Front-End Ready and interrupt with vector acknowledge ->
//   raw-data mode (4096 D32 reads), hit mode (pointer memories) and
//   hit-and-cluster mode (pointer plus D16 raw reads around each cluster)
//   readouts, all compared with values computed here; a second event
//   arriving during the VME readout, held until the VME reset command;
//   a Fast Clear during the front-end readout (scan restarts at its end);
//   a 3rd-level reject aborting a readout; pulse shortening by SQD4; an
//   overloaded supply being switched off while a normal one stays on; and a
//   fourth event read out at 10 MSps with the sequencer stepped by a 20 MHz
//   external clock (duration checked, raw data compared).
// Each of these mechanisms is counted and must happen at least once.
module tb_onsiroc_top;
  import onsiroc_pkg::*;
  localparam int BASE = 100;
  localparam int NSTEP = 2048 + 4;
  localparam logic [31:0] WIN = 32'h0040_0000;   // A24 base 1

  logic clk = 1'b0, rst = 1'b1;
  logic vme_as_n = 1, vme_write_n = 1, vme_lword_n = 1, vme_iack_n = 1, vme_iackin_n = 1;
  logic [1:0] vme_ds_n = 2'b11;
  logic [5:0] vme_am = '0;
  logic [31:1] vme_a = '0;
  logic [31:0] vme_d_in = '0, vme_d_out;
  logic vme_d_oe, vme_dtack_n, vme_iackout_n;
  logic [7:1] vme_irq_n;
  logic [1:0] base_a24 = 2'd1;
  logic [9:0] base_a32 = 10'h155;
  logic trig_l1 = 0, trig_l2 = 0, trig_fast_clear = 0, trig_l3_keep = 0, trig_l3_reject = 0;
  logic trig_run = 0, ext_clk = 0;
  logic fe_ready;
  logic [3:0][12:0] adc_data;
  logic adc_convert;
  logic [3:0][7:0] fine_code, coarse_code, bias_code;
  logic [3:0] input_enable;
  logic [3:0] control, control_n;
  logic [2:0] sqd_ext;
  logic [11:0] reg_sw = '0, reg_on;

  onsiroc_top dut (.*);

  always #6.25 clk = ~clk;   // 80 MHz
  bit ext_run = 0;
  always #25 if (ext_run) ext_clk = ~ext_clk;   // 20 MHz sequencer clock when used

  // ---------------- analogue paths -------------------------------------------
  logic c3_q = 0;
  logic fe_clear;
  always @(posedge clk) c3_q <= control[3];
  assign fe_clear = control[3] && !c3_q;   // front-end readout restart line

  for (genvar c = 0; c < 4; c++) begin : g_fe
    frontend_model #(.BASE(BASE)) fe (.clk, .clear(fe_clear), .convert(adc_convert),
      .input_enable(input_enable[c]), .fine_code(fine_code[c]), .adc_data(adc_data[c]));
  end

  // ---------------- regulators: supply 0 normal, supply 4 overloaded --------------
  initial forever begin
    repeat (3) begin reg_sw[0] = 1; #5us; reg_sw[0] = 0; #5us; end
    #40us;
  end
  initial forever begin reg_sw[4] = 1; #5us; reg_sw[4] = 0; #5us; end

  // ---------------- bookkeeping -----------------------------------------------
  int checks = 0, failures = 0;
  int m_scan = 0, m_l1 = 0, m_readout = 0, m_irq = 0, m_raw = 0, m_hit = 0, m_hitcl = 0;
  int m_pending = 0, m_fc_defer = 0, m_reject = 0, m_short = 0, m_trip = 0, m_d16 = 0;
  int m_ext = 0;
  int short_len = 0;

  always @(posedge clk) begin
    if (control[1]) short_len <= short_len + 1;
    else begin
      if (short_len == 4) m_short++;   // half of an 8-clock step
      short_len <= 0;
    end
  end

  initial begin
    #60ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- VME master -------------------------------------------------
  logic [31:0] rd;
  bit ack;
  int n_vme = 0;
  realtime t_ds, max_lat = 0;
  task automatic vme(input logic [5:0] m, input logic [31:0] adr, input bit wr,
                     input bit d32, input logic [31:0] wd);
    vme_am = m; vme_a = adr[31:1]; vme_lword_n = !d32; vme_write_n = !wr; vme_d_in = wd;
    #30ns vme_as_n = 0;
    #10ns vme_ds_n = 2'b00;
    t_ds = $realtime;
    ack = 0;
    fork
      begin wait (!vme_dtack_n); ack = 1; end
      #5us;
    join_any
    disable fork;
    rd = vme_d_out;
    if (ack && $realtime - t_ds > max_lat) max_lat = $realtime - t_ds;
    vme_ds_n = 2'b11; vme_as_n = 1;
    wait (vme_dtack_n);
    n_vme++;
    #20ns;
  endtask

  task automatic wr32(input logic [31:0] off, input logic [31:0] d);
    vme(6'h39, WIN + off, 1, 1, d);
    if (!ack) check(0, $sformatf("no DTACK writing %h", off));
  endtask
  task automatic rd32(input logic [31:0] off);
    vme(6'h39, WIN + off, 0, 1, 0);
    if (!ack) check(0, $sformatf("no DTACK reading %h", off));
  endtask
  task automatic rd16(input logic [31:0] off);
    vme(6'h39, WIN + off, 0, 0, 0);
    if (!ack) check(0, $sformatf("no DTACK reading %h", off));
    m_d16++;
  endtask
  function automatic logic [31:0] reg_a(input int r); return 32'h30_0000 + 32'(4 * r); endfunction
  function automatic logic [31:0] seq_a(input logic [16:0] a); return 32'(a) << 2; endfunction
  function automatic logic [31:0] ped_a(input int c, input int cl, input int j);
    return 32'h10_0000 + 32'(c << 18) + 32'(((cl << 11) | j) << 2);
  endfunction
  function automatic logic [31:0] raw_a(input int c, input int j);   // D32 word of the pair
    return 32'h20_0000 + 32'((c / 2) << 13) + 32'(j << 2);
  endfunction
  function automatic logic [31:0] ptr_a(input int c, input int i);
    return 32'h28_0000 + 32'(c << 13) + 32'(i << 2);
  endfunction

  task automatic pulse(ref logic s);
    s = 1; #300ns; s = 0; #300ns;
  endtask

  function automatic logic [31:0] w(input logic [16:0] nxt, input logic [15:0] data);
    logic [15:0] d;
    d = data;
    d[SQD_A16] = nxt[16];
    return {nxt[15:0], d};
  endfunction

  // ---------------- expected event data ----------------------------------------
  int sig [4][2048];
  logic [11:0] thr [4];
  logic [11:0] mw [4];

  function automatic int expv(input int c, input int j);
    int v;
    v = BASE + sig[c][j];
    return v > 4095 ? 13'h1FFF : v;
  endfunction

  task automatic make_event(input int occ);
    for (int c = 0; c < 4; c++) begin
      bit run;
      run = 0;
      for (int j = 0; j < 2048; j++) begin
        run = ($urandom_range(99) < (run ? 60 : occ / 2));
        sig[c][j] = run ? 150 + $urandom_range(3000) : $urandom_range(30);
        g_fe[0].fe.sig[j] = (c == 0) ? sig[0][j] : g_fe[0].fe.sig[j];
      end
    end
    for (int j = 0; j < 2048; j++) begin
      g_fe[1].fe.sig[j] = sig[1][j];
      g_fe[2].fe.sig[j] = sig[2][j];
      g_fe[3].fe.sig[j] = sig[3][j];
    end
  endtask

  function automatic int pedv(input int c, input int cl, input int j);
    return (c * 37 + j * 13 + cl * 7) % 256;
  endfunction

  task automatic load_pedestals(input int cl);
    for (int c = 0; c < 4; c++)
      for (int j = 0; j < 2048; j++) wr32(ped_a(c, cl, j), 32'(pedv(c, cl, j)));
    for (int j = 0; j < 2048; j++) begin
      g_fe[0].fe.ped[j] = pedv(0, cl, j);
      g_fe[1].fe.ped[j] = pedv(1, cl, j);
      g_fe[2].fe.ped[j] = pedv(2, cl, j);
      g_fe[3].fe.ped[j] = pedv(3, cl, j);
    end
  endtask

  // reference clusters of channel c
  task automatic ref_clusters(input int c, output int first [$], output int width [$]);
    int i, s;
    first.delete(); width.delete();
    i = 0;
    while (i < 2048) begin
      if (expv(c, i) > int'(thr[c])) begin
        s = i;
        while (i < 2048 && expv(c, i) > int'(thr[c])) i++;
        if (i - s > int'(mw[c])) begin first.push_back(s); width.push_back(i - s); end
      end else i++;
    end
  endtask

  task automatic raw_mode(input string tag);
    int nerr;
    realtime t0;
    nerr = 0;
    t0 = $realtime;
    for (int p = 0; p < 2; p++)
      for (int j = 0; j < 2048; j++) begin
        rd32(raw_a(2 * p, j));
        if (rd[28:16] != 13'(expv(2 * p, j)) || rd[12:0] != 13'(expv(2 * p + 1, j))) nerr++;
      end
    check(nerr == 0, $sformatf("%s raw mode: %0d of 4096 words wrong", tag, nerr));
    $display("%s raw mode: 4096 D32 transfers in %0.1f us", tag, ($realtime - t0) / 1us);
    m_raw++;
  endtask

  task automatic hit_modes();
    int first [$], width [$];
    int nerr, ntr;
    realtime t0;
    nerr = 0; ntr = 0;
    t0 = $realtime;
    for (int c = 0; c < 4; c++) begin
      ref_clusters(c, first, width);
      rd32(reg_a(R_NCLU0 + c)); ntr++;
      check(int'(rd) == first.size(), $sformatf("ch %0d: %0d clusters, expected %0d", c, rd, first.size()));
      for (int i = 0; i < first.size(); i++) begin
        rd32(ptr_a(c, i)); ntr++;
        if (int'(rd[22:12]) != first[i] || int'(rd[11:0]) != width[i]) nerr++;
      end
    end
    check(nerr == 0, $sformatf("hit mode: %0d pointer words wrong", nerr));
    $display("hit mode: %0d transfers in %0.1f us", ntr, ($realtime - t0) / 1us);
    m_hit++;
    // hit-and-cluster mode: pointer word, then raw data of the cluster and one
    // neighbour on each side, D16 reads of the channel's half-word
    nerr = 0; ntr = 0;
    t0 = $realtime;
    for (int c = 0; c < 4; c++) begin
      ref_clusters(c, first, width);
      for (int i = 0; i < first.size(); i++) begin
        int f, wd;
        rd32(ptr_a(c, i)); ntr++;
        f = int'(rd[22:12]); wd = int'(rd[11:0]);
        for (int j = f - 1; j <= f + wd; j++) begin
          if (j < 0 || j > 2047) continue;
          rd16(raw_a(c, j) + ((c % 2) ? 2 : 0)); ntr++;
          if (rd[12:0] != 13'(expv(c, j))) nerr++;
        end
      end
    end
    check(nerr == 0, $sformatf("hit-and-cluster mode: %0d raw words wrong", nerr));
    $display("hit-and-cluster mode: %0d transfers in %0.1f us", ntr, ($realtime - t0) / 1us);
    m_hitcl++;
  endtask

  task automatic wait_irq(input realtime tmax, output realtime t);
    realtime t0;
    t0 = $realtime;
    while (vme_irq_n[2] && ($realtime - t0) < tmax) #50ns;
    t = $realtime - t0;
  endtask

  task automatic iack();
    vme_iack_n = 0; vme_iackin_n = 0;
    vme(6'h39, 32'h0000_0004, 0, 0, 0);    // level 2 in A3..A1
    vme_iack_n = 1; vme_iackin_n = 1;
    check(ack && rd[7:0] == 8'h15, $sformatf("interrupt vector %h", rd[7:0]));
    #200ns check(vme_irq_n == 7'h7F, "interrupt released by acknowledge");
    m_irq++;
  endtask

  // ---------------- test sequence -------------------------------------------------
  initial begin
    logic [16:0] a;
    int cl;
    realtime t_ro, t0;
    #200ns rst = 0;
    #200ns;
    // configuration
    wr32(reg_a(R_CR1), 32'((1 << CR1_PED_EN) | (1 << CR1_INT_CLK) | (1 << CR1_INT_RUN) |
                           (1 << CR1_FER_EN) | (1 << CR1_CTRL_EN) | (2 << CR1_IRQ_LVL_LO) |
                           (5'h15 << CR1_IVEC_LO)));
    wr32(reg_a(R_CR2), 32'h0000_0011);            // Va1 and Vd1 on
    for (int c = 0; c < 4; c++) begin
      thr[c] = 12'(200 + 50 * c); mw[c] = 12'(c % 3);
      wr32(reg_a(R_THR0 + c), 32'(thr[c]));
      wr32(reg_a(R_MINW0 + c), 32'(mw[c]));
      wr32(reg_a(R_COARSE0 + c), 32'(40 + c));
      wr32(reg_a(R_BIAS0 + c), 32'(200 + c));
    end
    check(coarse_code[2] == 8'd42 && bias_code[3] == 8'd203, "DAC code outputs");
    wr32(reg_a(R_SCAN_ADR), 32'h0000);
    wr32(reg_a(R_RO_ADR), 32'h0000);
    // scan program: two-step endless loop, cell counter advances every loop
    wr32(seq_a(17'h00000), w(17'h00001, 16'((1 << 0) | (1 << SQD_CELLINC) | (1 << SQD_SCAN))));
    wr32(seq_a(17'h00001), w(17'h00000, 16'(1 << SQD_SCAN)));
    // readout program in the upper half
    a = 17'h10000;
    wr32(seq_a(a), w(a + 1, 16'((1 << SQD_CHCLEAR) | (1 << 3) | (1 << SQD_ROPHASE) |
                                (1 << 1) | (1 << SQD_SHORT))));
    a++;
    for (int k = 0; k < NSTEP; k++) begin
      wr32(seq_a(a), w(a + 1, 16'((1 << SQD_CONVERT) | (1 << 2) | (1 << SQD_ROPHASE)))); a++;
      wr32(seq_a(a), w(a + 1, 16'(1 << SQD_ROPHASE))); a++;
    end
    wr32(seq_a(a), w(a, 16'((1 << SQD_STOP) | (1 << SQD_ROPHASE))));
    rd32(seq_a(17'h10005));
    check(rd == w(17'h10006, 16'((1 << SQD_CONVERT) | (1 << 2) | (1 << SQD_ROPHASE))), "program read-back");

    // ---- scan phase
    pulse(trig_fast_clear);
    #20us;
    rd32(reg_a(R_STATUS));
    check(rd[ST_SCAN] && rd[ST_SEQ_RUN] && rd[ST_FE_READY], $sformatf("scan phase status %b", rd[15:0]));
    if (rd[ST_SCAN]) m_scan++;
    // ---- 1st-level trigger freezes the pipeline
    pulse(trig_l1);
    rd32(reg_a(R_STATUS));
    check(!rd[ST_SEQ_RUN], "sequencer frozen by L1");
    m_l1++;
    rd32(reg_a(R_CNT0 + 2));
    cl = int'(rd[4:0]);
    for (int c = 1; c < 4; c++) begin
      rd32(reg_a(R_CNT0 + 4 * c + 2));
      check(int'(rd[4:0]) == cl, "all channels hold the same cell");
    end
    $display("event 1 frozen in pipeline cell %0d", cl);
    load_pedestals(cl);
    make_event(10);
    // ---- 2nd-level trigger: front-end readout
    pulse(trig_l2);
    rd32(reg_a(R_STATUS));
    check(rd[ST_L2_PROMPT] && rd[ST_L2_DELAY] && !rd[ST_FE_READY] && rd[ST_SEQ_RUN],
          $sformatf("readout status %b", rd[15:0]));
    #100us;
    pulse(trig_fast_clear);                      // arrives during the readout
    rd32(reg_a(R_STATUS));
    check(!rd[ST_SCAN] && rd[ST_SEQ_RUN], "fast clear does not cut the readout");
    wait_irq(1ms, t_ro);
    t_ro += 100us + 2 * 600ns + 2 * 1us;         // time spent before wait_irq
    $display("front-end readout: %0.1f us", t_ro / 1us);
    check(t_ro > 405us && t_ro < 420us, $sformatf("front-end readout took %0.1f us", t_ro / 1us));
    m_readout++;
    rd32(reg_a(R_STATUS));
    check(rd[ST_FE_READY] && rd[ST_L2_DELAY] && rd[ST_IRQ] && fe_ready, "front end ready after stop bit");
    check(rd[ST_SCAN], "scan restarted after the deferred fast clear");
    if (rd[ST_SCAN]) m_fc_defer++;
    iack();
    // ---- VME readout of event 1; event 2 arrives meanwhile
    fork
      raw_mode("event 1");
      begin #300us; pulse(trig_l1); pulse(trig_l2); end
    join
    rd32(reg_a(R_STATUS));
    check(rd[ST_L2_DELAY] && !rd[ST_FE_READY] && !rd[ST_SEQ_RUN], "event 2 held while delayed");
    hit_modes();
    // event 2: pedestals of its cell and its signals, then the VME command
    // that ends event 1's readout
    rd32(reg_a(R_CNT0 + 2));
    cl = int'(rd[4:0]);
    $display("event 2 frozen in pipeline cell %0d", cl);
    load_pedestals(cl);
    make_event(30);
    wr32(reg_a(R_CMD), 32'(1 << CMD_RESET_DELAYED));
    m_pending++;
    wait_irq(1ms, t_ro);
    check(t_ro < 420us, "event 2 read out after the reset command");
    iack();
    raw_mode("event 2");
    hit_modes();
    wr32(reg_a(R_CMD), 32'(1 << CMD_RESET_DELAYED));
    // ---- event 3 rejected by the 3rd-level trigger
    pulse(trig_fast_clear);
    #10us;
    pulse(trig_l1);
    pulse(trig_l2);
    #50us;
    pulse(trig_l3_reject);
    rd32(reg_a(R_STATUS));
    check(rd[ST_L3_REJ] && rd[ST_SCAN] && rd[ST_FE_READY], $sformatf("reject status %b", rd[15:0]));
    if (rd[ST_L3_REJ]) m_reject++;
    rd32(reg_a(R_EVCNT));
    check(rd == 32'd3, $sformatf("event counter %0d", rd));
    // ---- supplies
    rd32(reg_a(R_TRIP));
    check(rd[11:0] == 12'h010, $sformatf("trip flags %h", rd[11:0]));
    check(reg_on[0] && !reg_on[4], "normal supply on, overloaded supply off");
    if (rd[4]) m_trip++;
    // ---- event 4 at 10 MSps: sequencer stepped by a 20 MHz external clock
    ext_run = 1;
    wr32(reg_a(R_CR1), 32'((1 << CR1_PED_EN) | (1 << CR1_INT_RUN) |
                           (1 << CR1_FER_EN) | (1 << CR1_CTRL_EN) | (2 << CR1_IRQ_LVL_LO) |
                           (5'h15 << CR1_IVEC_LO)));
    #10us;
    pulse(trig_l1);
    rd32(reg_a(R_CNT0 + 2));
    cl = int'(rd[4:0]);
    load_pedestals(cl);
    make_event(10);
    t0 = $realtime;
    pulse(trig_l2);
    wait_irq(1ms, t_ro);
    t_ro = $realtime - t0;
    $display("front-end readout at 10 MSps (external clock): %0.1f us", t_ro / 1us);
    check(t_ro > 203us && t_ro < 212us, $sformatf("10 MSps readout took %0.1f us", t_ro / 1us));
    iack();
    raw_mode("event 4");
    wr32(reg_a(R_CMD), 32'(1 << CMD_RESET_DELAYED));
    m_ext++;
    // ---- mechanisms
    check(m_short > 0, "SQD4 pulse shortening seen");
    // slave answer time: two synchroniser clocks, request, target, DTACK
    $display("longest data strobe to DTACK: %0.1f ns", max_lat / 1ns);
    check(max_lat <= 6 * 12.5ns, $sformatf("DTACK after %0.1f ns", max_lat / 1ns));
    check(m_scan > 0 && m_l1 > 0 && m_readout > 0 && m_irq > 0 && m_raw > 0 && m_hit > 0 &&
          m_hitcl > 0 && m_pending > 0 && m_fc_defer > 0 && m_reject > 0 && m_trip > 0 && m_d16 > 0 && m_ext > 0,
          "every mechanism exercised");
    $display("mechanisms: scan %0d L1-freeze %0d readout %0d irq %0d raw %0d hit %0d hit+cluster %0d",
             m_scan, m_l1, m_readout, m_irq, m_raw, m_hit, m_hitcl);
    $display("            pending-event %0d deferred-FC %0d L3-reject %0d short-pulse %0d trip %0d D16 %0d",
             m_pending, m_fc_defer, m_reject, m_short, m_trip, m_d16);
    $display("            10-MSps-external-clock %0d", m_ext);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
