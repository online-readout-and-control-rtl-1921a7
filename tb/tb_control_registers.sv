// tb_control_registers: self-checking test of the register file.
//
// Writes and reads back every read/write register, with partial byte
// enables; checks the decoded outputs (supply enables, input enables,
// interrupt level and vector, thresholds and DAC codes), the status
// register bit positions of the published table, the one-clock command
// pulses, the event counter write strobe and the read-only registers.
module tb_control_registers;
  import onsiroc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic en = 0, we = 0;
  logic [3:0] be = 4'hF;
  logic [7:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic seq_running = 0, scan_on = 0, l2_prompt = 0, l2_delayed = 0, fe_ready = 0;
  logic irq_on = 0, l2_keep = 0, l3_keep = 0, l3_rej = 0;
  logic [11:0] ps_on = '0, ps_trip = 12'h5A5;
  logic [31:0] event_count = 32'h1234_5678;
  logic [16:0] seq_pc = 17'h1ABCD;
  logic [3:0][11:0] n_clusters = {12'd4, 12'd3, 12'd2, 12'd1};
  logic [15:0] cr1, cr2, status;
  logic [7:0] cmd;
  logic ev_we;
  logic [31:0] ev_wdata;
  logic [15:0] scan_addr, ro_addr;
  logic [16:0] test_addr;
  logic [3:0][11:0] threshold, min_width;
  logic [3:0][7:0] coarse_code, bias_code;
  logic [11:0] ps_enable;
  logic [3:0] input_enable;
  logic [2:0] irq_level;
  logic [7:0] irq_vector;
  int checks = 0, failures = 0;
  int n_cmd = 0;

  control_registers dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (cmd != 0) n_cmd++;

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

  task automatic wr(input int a, input logic [31:0] d, input logic [3:0] b = 4'hF);
    @(negedge clk); en = 1; we = 1; addr = 8'(a); wdata = d; be = b;
    @(negedge clk); en = 0; we = 0; be = 4'hF;
  endtask

  task automatic rd(input int a, output logic [31:0] d);
    @(negedge clk); en = 1; we = 0; addr = 8'(a);
    @(negedge clk); en = 0; d = rdata;
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst = 0;
    wr(R_CR1, 32'h0000_F6A5);
    rd(R_CR1, d); check(d == 32'h0000_F6A5, "CR1 read-back");
    check(irq_level == 3'd3 && irq_vector == 8'h1E, $sformatf("irq level %0d vector %h", irq_level, irq_vector));
    wr(R_CR2, 32'h0000_1F0F);
    check(ps_enable == 12'hF0F, "supply enables");
    check(input_enable == 4'b1100, "input disable bit 12 -> channels 0,1");
    wr(R_CR2, 32'h0000_2000, 4'b0010);
    rd(R_CR2, d); check(d == 32'h0000_200F, $sformatf("CR2 byte write %h", d));
    check(input_enable == 4'b0011, "input disable bit 13 -> channels 2,3");
    for (int c = 0; c < 4; c++) begin
      wr(R_THR0 + c, 32'(100 * c + 7));
      wr(R_MINW0 + c, 32'(c + 1));
      wr(R_COARSE0 + c, 32'(16 * c + 3));
      wr(R_BIAS0 + c, 32'(200 - c));
    end
    for (int c = 0; c < 4; c++) begin
      check(threshold[c] == 12'(100 * c + 7) && min_width[c] == 12'(c + 1), "threshold/min width");
      check(coarse_code[c] == 8'(16 * c + 3) && bias_code[c] == 8'(200 - c), "DAC codes");
      rd(R_THR0 + c, d); check(d == 32'(100 * c + 7), "threshold read");
      rd(R_NCLU0 + c, d); check(d == 32'(c + 1), "cluster count read");
    end
    wr(R_SCAN_ADR, 32'h1234); wr(R_RO_ADR, 32'h5678); wr(R_TEST_ADR, 32'h1_9ABC);
    check(scan_addr == 16'h1234 && ro_addr == 16'h5678 && test_addr == 17'h19ABC, "start addresses");
    rd(R_SEQ_PC, d); check(d == 32'h1ABCD, "sequencer address");
    rd(R_TRIP, d); check(d == 32'h5A5, "trip flags");
    rd(R_EVCNT, d); check(d == 32'h1234_5678, "event counter read");
    // event counter write: strobe carries merged data
    fork
      wr(R_EVCNT, 32'hAAAA_0000, 4'b1100);
      begin @(posedge ev_we); @(negedge clk);
        check(ev_wdata == 32'hAAAA_5678, $sformatf("event counter write data %h", ev_wdata)); end
    join
    // command pulses
    n_cmd = 0;
    wr(R_CMD, 32'h0000_0021);
    repeat (3) @(posedge clk);
    check(n_cmd == 1, $sformatf("command pulse lasted %0d clocks", n_cmd));
    // status bits
    seq_running = 1; fe_ready = 1; l3_rej = 1; ps_on = 12'b0000_0101_0111;
    rd(R_STATUS, d);
    check(d[15:0] == 16'b0000_1011_0001_0001, $sformatf("status %b", d[15:0]));
    seq_running = 0; fe_ready = 0; l3_rej = 0; ps_on = '0;
    scan_on = 1; l2_prompt = 1; l2_delayed = 1; irq_on = 1; l2_keep = 1; l3_keep = 1;
    rd(R_STATUS, d);
    check(d[15:0] == 16'b0000_0000_1110_1110, $sformatf("status %b", d[15:0]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
