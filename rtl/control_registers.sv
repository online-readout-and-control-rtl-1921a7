// control_registers: control, status, command and configuration registers.
//
// Control register 1 (triggers, clock source, interrupt level and vector),
// control register 2 (power supply switches, analogue input disable,
// 3rd-level trigger disables) and the status register, bit for bit as in the
// published register table, plus this design's configuration registers:
// command (write-one pulses), event counter, the three sequencer start
// addresses, per-channel hit thresholds, minimum cluster widths, coarse
// pedestal DAC codes and bias voltage DAC codes, and read-only cluster
// counts, sequencer address and supply overload flags.
//
// Bus: one access per `en` pulse, word offset `addr`; byte enables apply to
// writes; read data are valid one clock later. Reset clears everything, so
// the board starts with supplies off, interrupts and control lines disabled.
// Interrupt level: control register 1 has a two-bit encoded level field
// (bits 9-10) and a five-bit vector (bits 11-15); the field value n requests
// level n, 0 disables the interrupt. Status bits 9-12 are "Va_i and Vd_i on".
// Bit 12 of control register 2 disables the inputs of channels 0 and 1,
// bit 13 those of channels 2 and 3.
module control_registers
  import onsiroc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // local bus (register page)
  input  logic        en,
  input  logic        we,
  input  logic [3:0]  be,
  input  logic [7:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  // status inputs
  input  logic        seq_running,
  input  logic        scan_on,
  input  logic        l2_prompt,
  input  logic        l2_delayed,
  input  logic        fe_ready,
  input  logic        irq_on,
  input  logic        l2_keep,
  input  logic        l3_keep,
  input  logic        l3_rej,
  input  logic [N_SUPPLIES-1:0] ps_on,
  input  logic [N_SUPPLIES-1:0] ps_trip,
  input  logic [31:0] event_count,
  input  logic [SEQ_AW-1:0] seq_pc,
  input  logic [N_CH-1:0][STRIP_W:0] n_clusters,
  // outputs
  output logic [15:0] cr1,
  output logic [15:0] cr2,
  output logic [15:0] status,
  output logic [7:0]  cmd,
  output logic        ev_we,
  output logic [31:0] ev_wdata,
  output logic [15:0] scan_addr,
  output logic [15:0] ro_addr,
  output logic [SEQ_AW-1:0] test_addr,
  output logic [N_CH-1:0][ADC_BITS-1:0] threshold,
  output logic [N_CH-1:0][WIDTH_W-1:0]  min_width,
  output logic [N_CH-1:0][PED_W-1:0]    coarse_code,
  output logic [N_CH-1:0][PED_W-1:0]    bias_code,
  output logic [N_SUPPLIES-1:0]         ps_enable,
  output logic [N_CH-1:0]               input_enable,
  output logic [2:0]  irq_level,
  output logic [7:0]  irq_vector
);
  logic [31:0] wmask;
  assign wmask = {{8{be[3]}}, {8{be[2]}}, {8{be[1]}}, {8{be[0]}}};

  function automatic logic [31:0] merge(logic [31:0] old_v, logic [31:0] new_v,
                                        logic [31:0] m);
    return (old_v & ~m) | (new_v & m);
  endfunction

  // status register (published bit assignment)
  always_comb begin
    status = '0;
    status[ST_SEQ_RUN]   = seq_running;
    status[ST_SCAN]      = scan_on;
    status[ST_L2_PROMPT] = l2_prompt;
    status[ST_L2_DELAY]  = l2_delayed;
    status[ST_FE_READY]  = fe_ready;
    status[ST_IRQ]       = irq_on;
    status[ST_L2_KEEP]   = l2_keep;
    status[ST_L3_KEEP]   = l3_keep;
    status[ST_L3_REJ]    = l3_rej;
    for (int i = 0; i < 4; i++) status[ST_PS0 + i] = ps_on[i] && ps_on[4 + i];
  end

  assign ps_enable    = cr2[N_SUPPLIES-1:0];
  assign input_enable = {{2{!cr2[CR2_IN_DIS_B]}}, {2{!cr2[CR2_IN_DIS_A]}}};
  assign irq_level    = {1'b0, cr1[CR1_IRQ_LVL_LO +: 2]};
  assign irq_vector   = {3'b000, cr1[CR1_IVEC_LO +: 5]};

  logic wr;
  assign wr = en && we;

  always_ff @(posedge clk) begin
    if (rst) begin
      cr1 <= '0; cr2 <= '0; cmd <= '0; ev_we <= 1'b0; ev_wdata <= '0;
      scan_addr <= '0; ro_addr <= '0; test_addr <= '0;
      threshold <= '0; min_width <= '0; coarse_code <= '0; bias_code <= '0;
    end else begin
      cmd   <= '0;
      ev_we <= 1'b0;
      if (wr) begin
        unique case (int'(addr))
          R_CR1:      cr1 <= 16'(merge(32'(cr1), wdata, wmask));
          R_CR2:      cr2 <= 16'(merge(32'(cr2), wdata, wmask));
          R_CMD:      cmd <= wdata[7:0] & wmask[7:0];
          R_EVCNT:    begin ev_we <= 1'b1; ev_wdata <= merge(event_count, wdata, wmask); end
          R_SCAN_ADR: scan_addr <= 16'(merge(32'(scan_addr), wdata, wmask));
          R_RO_ADR:   ro_addr   <= 16'(merge(32'(ro_addr), wdata, wmask));
          R_TEST_ADR: test_addr <= SEQ_AW'(merge(32'(test_addr), wdata, wmask));
          default: begin
            for (int c = 0; c < N_CH; c++) begin
              if (int'(addr) == R_THR0 + c)
                threshold[c] <= ADC_BITS'(merge(32'(threshold[c]), wdata, wmask));
              if (int'(addr) == R_MINW0 + c)
                min_width[c] <= WIDTH_W'(merge(32'(min_width[c]), wdata, wmask));
              if (int'(addr) == R_COARSE0 + c)
                coarse_code[c] <= PED_W'(merge(32'(coarse_code[c]), wdata, wmask));
              if (int'(addr) == R_BIAS0 + c)
                bias_code[c] <= PED_W'(merge(32'(bias_code[c]), wdata, wmask));
            end
          end
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= '0;
      unique case (int'(addr))
        R_CR1:      rdata <= 32'(cr1);
        R_CR2:      rdata <= 32'(cr2);
        R_STATUS:   rdata <= 32'(status);
        R_EVCNT:    rdata <= event_count;
        R_SCAN_ADR: rdata <= 32'(scan_addr);
        R_RO_ADR:   rdata <= 32'(ro_addr);
        R_TEST_ADR: rdata <= 32'(test_addr);
        R_SEQ_PC:   rdata <= 32'(seq_pc);
        R_TRIP:     rdata <= 32'(ps_trip);
        default: begin
          for (int c = 0; c < N_CH; c++) begin
            if (int'(addr) == R_THR0 + c)    rdata <= 32'(threshold[c]);
            if (int'(addr) == R_MINW0 + c)   rdata <= 32'(min_width[c]);
            if (int'(addr) == R_COARSE0 + c) rdata <= 32'(coarse_code[c]);
            if (int'(addr) == R_BIAS0 + c)   rdata <= 32'(bias_code[c]);
            if (int'(addr) == R_NCLU0 + c)   rdata <= 32'(n_clusters[c]);
          end
        end
      endcase
    end
  end
endmodule
