// channel_counters: address counters of one input channel.
//
// CH1 addresses the pedestal memory on the FADC input side; CH2 addresses
// the raw data memory on the FADC output side and runs DELAY conversion
// steps behind CH1, compensating the time from pedestal fetch through the
// analogue adder and the pipelined FADC to valid output data. Both count
// once per conversion strobe `step` and stop after the last strip. The 5-bit
// cell counter records the front-end pipeline cell, so that the pedestal of
// the right cell is used. All three counters can be loaded over VME.
//
// Timing: `fetch` and `wr_en` are combinational, one pulse per step:
// `fetch` while CH1 has strips left, `wr_en` once CH2 is running and has
// strips left; the counters advance on the same edge. `clear` (sequencer)
// restarts a channel scan; `busy` is high from the first step until the
// last raw write.
// Two counters and a 5-bit cell counter follow the published description;
// DELAY = 4 (one clock for the pedestal read plus a 3-stage FADC pipeline)
// is this design's choice, the text only says "several clock cycles".
module channel_counters #(
  parameter int unsigned STRIP_W = 11,
  parameter int unsigned CELL_W  = 5,
  parameter int unsigned DELAY   = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               clear,
  input  logic               step,
  input  logic               cell_inc,
  input  logic               cell_clr,
  // VME load: sel 0 = CH1, 1 = CH2, 2 = cell counter
  input  logic               ld_en,
  input  logic [1:0]         ld_sel,
  input  logic [15:0]        ld_val,
  output logic [STRIP_W-1:0] ch1,
  output logic [STRIP_W-1:0] ch2,
  output logic [CELL_W-1:0]  pcell,
  output logic               fetch,
  output logic               wr_en,
  output logic               busy
);
  localparam int unsigned LAG_W = $clog2(DELAY + 1);

  logic             ch1_done, ch2_done;
  logic [LAG_W-1:0] lag;
  logic             ch2_run;

  assign ch2_run = (lag == LAG_W'(DELAY));
  assign fetch   = step && !ch1_done;
  assign wr_en   = step && ch2_run && !ch2_done;
  assign busy    = (lag != '0 || ch1 != '0 || ch1_done) && !ch2_done;

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      ch1 <= '0; ch2 <= '0; lag <= '0;
      ch1_done <= 1'b0; ch2_done <= 1'b0;
    end else if (ld_en && ld_sel == 2'd0) begin
      ch1 <= ld_val[STRIP_W-1:0];
    end else if (ld_en && ld_sel == 2'd1) begin
      ch2 <= ld_val[STRIP_W-1:0];
    end else if (step) begin
      if (!ch1_done) begin
        ch1 <= ch1 + 1'b1;
        if (&ch1) ch1_done <= 1'b1;
      end
      if (!ch2_run) lag <= lag + 1'b1;
      else if (!ch2_done) begin
        ch2 <= ch2 + 1'b1;
        if (&ch2) ch2_done <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst || cell_clr) pcell <= '0;
    else if (ld_en && ld_sel == 2'd2) pcell <= ld_val[CELL_W-1:0];
    else if (cell_inc) pcell <= pcell + 1'b1;
  end
endmodule
