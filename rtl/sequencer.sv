// sequencer: microprogrammed generator of front-end and board control signals.
//
// A 128K x 32 microprogram memory. Each word holds 16 data bits SQD0..15
// (the control outputs of one step) and 16 next-address bits SQD16..31; the
// 17th next-address bit SQA16 is taken from SQD14, so a program can run
// anywhere in the memory, jump freely and loop forever. Three start
// addresses select the program: the scan sequence (lower memory half, SQA16
// = 0), the readout sequence (upper half, SQA16 = 1) and a test sequence
// (full 17-bit address). A start request interrupts whatever sequence is
// running (priority readout > scan > test when several arrive together).
// A step whose SQD15 (stop) bit is set is output and then the sequencer
// halts and pulses `stopped`; `halt` stops it from outside.
//
// Timing: one step lasts STEP_DIV clocks of `clk` with the internal clock,
// or one period of `ext_clk` (synchronised here) when `int_clk` is low. The
// board runs the sequencer at twice the readout frequency, i.e. a sample
// takes two steps. `sqd` changes at the start of a step and `stb` is high
// for the first clock of each step; board strobes are taken as sqd[i] & stb.
// When SQD4 is set, SQD1 and SQD2 are high only in the first half of the
// step (pulse shortened by 50 %). After a start, the first word appears at
// the second step boundary. The memory has a second port for VME access.
// Word layout, SQD14/SQD15 roles, start registers and the 50 % shortening
// follow the published description; the step divider, the request priority
// and that outputs hold their last value after a stop are this design's.
module sequencer
  import onsiroc_pkg::*;
#(
  parameter int unsigned AW       = SEQ_AW,
  parameter int unsigned STEP_DIV = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          int_clk,     // 1: internal divider, 0: ext_clk
  input  logic          ext_clk,
  input  logic          start_scan,
  input  logic          start_ro,
  input  logic          start_test,
  input  logic          halt,
  input  logic [15:0]   scan_addr,
  input  logic [15:0]   ro_addr,
  input  logic [AW-1:0] test_addr,
  // program memory port (VME)
  input  logic          p_en,
  input  logic          p_we,
  input  logic [AW-1:0] p_addr,
  input  logic [31:0]   p_wdata,
  output logic [31:0]   p_rdata,
  // outputs
  output logic [15:0]   sqd,
  output logic          stb,
  output logic          running,
  output logic          scan_mode,
  output logic          ro_mode,
  output logic          stopped,
  output logic [AW-1:0] pc
);
  localparam int unsigned DIV_W = (STEP_DIV > 1) ? $clog2(STEP_DIV) : 1;

  logic [31:0]      mem [1 << AW];
  logic [31:0]      word_q;
  logic [15:0]      sqd_q;
  logic             fresh;
  logic [DIV_W-1:0] div_cnt;
  logic [2:0]       ext_sync;
  logic             tick, half, any_start;

  // step timing
  assign any_start = start_scan || start_ro || start_test;
  always_ff @(posedge clk) begin
    if (rst) ext_sync <= '0;
    else     ext_sync <= {ext_sync[1:0], ext_clk};
  end

  always_ff @(posedge clk) begin
    if (rst || any_start || div_cnt == DIV_W'(STEP_DIV - 1)) div_cnt <= '0;
    else div_cnt <= div_cnt + 1'b1;
  end

  assign tick = int_clk ? (div_cnt == DIV_W'(STEP_DIV - 1))
                        : (ext_sync[1] && !ext_sync[2]);
  assign half = int_clk ? (div_cnt < DIV_W'(STEP_DIV / 2)) || (STEP_DIV == 1)
                        : ext_sync[2];

  // continuous read of the current word
  always_ff @(posedge clk) word_q <= mem[pc];

  always_ff @(posedge clk) begin
    if (rst) begin
      pc        <= '0;
      sqd_q     <= '0;
      running   <= 1'b0;
      scan_mode <= 1'b0;
      ro_mode   <= 1'b0;
      stopped   <= 1'b0;
      stb       <= 1'b0;
      fresh     <= 1'b0;
    end else begin
      stopped <= 1'b0;
      stb     <= 1'b0;
      fresh   <= 1'b0;
      if (start_ro) begin
        pc <= {1'b1, ro_addr};
        running <= 1'b1; ro_mode <= 1'b1; scan_mode <= 1'b0; fresh <= 1'b1;
      end else if (start_scan) begin
        pc <= {1'b0, scan_addr};
        running <= 1'b1; ro_mode <= 1'b0; scan_mode <= 1'b1; fresh <= 1'b1;
      end else if (start_test) begin
        pc <= test_addr;
        running <= 1'b1; ro_mode <= 1'b0; scan_mode <= 1'b0; fresh <= 1'b1;
      end else if (halt) begin
        running <= 1'b0; ro_mode <= 1'b0; scan_mode <= 1'b0;
      end else if (running && tick && !fresh) begin
        sqd_q <= word_q[15:0];
        stb   <= 1'b1;
        pc    <= {word_q[SQD_A16], word_q[31:16]};
        if (word_q[SQD_STOP]) begin
          running <= 1'b0; ro_mode <= 1'b0; scan_mode <= 1'b0;
          stopped <= 1'b1;
        end
      end
    end
  end

  // pulse shortening of SQD1 and SQD2
  always_comb begin
    sqd = sqd_q;
    if (sqd_q[SQD_SHORT] && !half) begin
      sqd[1] = 1'b0;
      sqd[2] = 1'b0;
    end
  end

  // VME port
  always_ff @(posedge clk) begin
    if (p_en) begin
      if (p_we) mem[p_addr] <= p_wdata;
      p_rdata <= mem[p_addr];
    end
  end

// a stopped sequencer is idle, and a step strobe only comes while stepping
  a_stop_idle: assert property (@(posedge clk) disable iff (rst) stopped |-> !running)
    else $error("sequencer: running after stop");
endmodule
