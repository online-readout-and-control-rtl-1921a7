// input_channel: digital part of one of the four analogue input channels.
//
// Ties together, as in the block diagram of an input path: the pedestal
// memory (addressed by cell counter and CH1, driving the fine pedestal DAC
// code `fine_code`), the channel counters, the raw data memory (written at
// CH2 with the FADC word `adc_data`, 12 bits + overflow) and, in parallel
// with that write, the hit/cluster finder filling the pointer memory.
//
// Sequencer strobes: `clear` starts an event (counters, finder), `step` is
// one FADC conversion, `cell_inc`/`cell_clr` drive the pipeline cell
// counter. `adc_data` must hold the result belonging to CH2 during a step.
//
// VME side: `v_sel` picks 0 = pedestal (addr[15:0] = {cell, strip}),
// 1 = raw data (addr[10:0]), 2 = pointer memory (addr[10:0], data
// {first[22:12], width[11:0]}), 3 = counters (addr[1:0]: 0 CH1, 1 CH2,
// 2 cell; write loads). Read data is valid one clock after `v_en`.
module input_channel
  import onsiroc_pkg::*;
#(
  parameter int unsigned DELAY = 4
) (
  input  logic                clk,
  input  logic                rst,
  // sequencer strobes
  input  logic                clear,
  input  logic                step,
  input  logic                cell_inc,
  input  logic                cell_clr,
  // configuration
  input  logic                ped_enable,
  input  logic [ADC_BITS-1:0] threshold,
  input  logic [WIDTH_W-1:0]  min_width,
  // analogue side
  input  logic [SAMPLE_W-1:0] adc_data,
  output logic [PED_W-1:0]    fine_code,
  // VME side
  input  logic                v_en,
  input  logic                v_we,
  input  logic [1:0]          v_sel,
  input  logic [15:0]         v_addr,
  input  logic [31:0]         v_wdata,
  output logic [31:0]         v_rdata,
  // status
  output logic [STRIP_W:0]    n_clusters,
  output logic [STRIP_W:0]    n_hits,
  output logic                busy
);
  logic [STRIP_W-1:0] ch1, ch2;
  logic [CELL_W-1:0]  pcell;
  logic               fetch, wr_en;

  logic               ptr_we;
  logic [STRIP_W-1:0] ptr_index, ptr_first;
  logic [WIDTH_W-1:0] ptr_width;

  logic [PED_W-1:0]           ped_rdata;
  logic [SAMPLE_W-1:0]        raw_rdata;
  logic [STRIP_W+WIDTH_W-1:0] ptr_rdata;
  logic [1:0]                 sel_q;
  logic [15:0]                cnt_q;

  channel_counters #(.STRIP_W(STRIP_W), .CELL_W(CELL_W), .DELAY(DELAY)) u_cnt (
    .clk, .rst, .clear, .step, .cell_inc, .cell_clr,
    .ld_en (v_en && v_we && v_sel == 2'd3),
    .ld_sel(v_addr[1:0]),
    .ld_val(v_wdata[15:0]),
    .ch1, .ch2, .pcell, .fetch, .wr_en, .busy
  );

  pedestal_memory #(.CELL_W(CELL_W), .STRIP_W(STRIP_W), .PED_W(PED_W)) u_ped (
    .clk, .fetch, .pcell, .ch1, .ped_enable, .fine_code,
    .v_en   (v_en && v_sel == 2'd0),
    .v_we,
    .v_addr (v_addr[CELL_W+STRIP_W-1:0]),
    .v_wdata(v_wdata[PED_W-1:0]),
    .v_rdata(ped_rdata)
  );

  raw_data_memory #(.AW(STRIP_W), .DW(SAMPLE_W)) u_raw (
    .clk,
    .wr_en, .wr_addr(ch2), .wr_data(adc_data),
    .v_en   (v_en && v_sel == 2'd1),
    .v_we,
    .v_addr (v_addr[STRIP_W-1:0]),
    .v_wdata(v_wdata[SAMPLE_W-1:0]),
    .v_rdata(raw_rdata)
  );

  hit_cluster_finder #(.STRIP_W(STRIP_W), .ADC_BITS(ADC_BITS), .WIDTH_W(WIDTH_W)) u_hcf (
    .clk, .rst, .clear,
    .valid(wr_en), .addr(ch2), .data(adc_data),
    .threshold, .min_width,
    .ptr_we, .ptr_index, .ptr_first, .ptr_width,
    .n_clusters, .n_hits
  );

  pointer_memory #(.AW(STRIP_W), .WW(WIDTH_W)) u_ptr (
    .clk,
    .wr_en(ptr_we), .wr_index(ptr_index), .wr_first(ptr_first), .wr_width(ptr_width),
    .v_en   (v_en && v_sel == 2'd2),
    .v_we,
    .v_addr (v_addr[STRIP_W-1:0]),
    .v_wdata(v_wdata[STRIP_W+WIDTH_W-1:0]),
    .v_rdata(ptr_rdata)
  );

  always_ff @(posedge clk) begin
    if (v_en) begin
      sel_q <= v_sel;
      unique case (v_addr[1:0])
        2'd0:    cnt_q <= 16'(ch1);
        2'd1:    cnt_q <= 16'(ch2);
        2'd2:    cnt_q <= 16'(pcell);
        default: cnt_q <= '0;
      endcase
    end
  end

  always_comb begin
    unique case (sel_q)
      2'd0:    v_rdata = 32'(ped_rdata);
      2'd1:    v_rdata = 32'(raw_rdata);
      2'd2:    v_rdata = 32'(ptr_rdata);
      default: v_rdata = 32'(cnt_q);
    endcase
  end
endmodule
