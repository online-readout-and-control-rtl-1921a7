// raw_data_memory: raw sample store of one analogue input channel.
//
// 2048 words of 13 bits: the 12-bit FADC result plus its overflow bit, as
// described for the board. Port A is written by the digitisation path at the
// address of channel counter CH2 (`wr_en`, `wr_addr`, `wr_data`). Port B is
// the VME port: synchronous read with one clock latency, and write so the
// memory can be tested from the bus. A simultaneous write of both ports to
// the same word leaves the port A value (the acquisition wins); that rule is
// this design's choice.
module raw_data_memory #(
  parameter int unsigned AW = 11,
  parameter int unsigned DW = 13
) (
  input  logic          clk,
  // acquisition write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  // VME port
  input  logic          v_en,
  input  logic          v_we,
  input  logic [AW-1:0] v_addr,
  input  logic [DW-1:0] v_wdata,
  output logic [DW-1:0] v_rdata
);
  logic [DW-1:0] mem [1 << AW];

  always_ff @(posedge clk) begin
    if (v_en && v_we && !(wr_en && wr_addr == v_addr)) mem[v_addr] <= v_wdata;
    if (wr_en) mem[wr_addr] <= wr_data;
    if (v_en) v_rdata <= mem[v_addr];
  end
endmodule
