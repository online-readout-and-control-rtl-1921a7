// pointer_memory: cluster list of one analogue input channel.
//
// 2048 words, as deep as the raw data memory. Each accepted cluster is stored
// by the hit/cluster finder as one word {first strip address, width}; word n
// holds the n-th cluster of the event, so reading words 0 .. count-1 gives
// the "hit mode" event record. Port A is the finder's write port, port B the
// VME port (read latency one clock; writable for memory tests). The word
// layout {11-bit address, 12-bit width} is this design's choice.
module pointer_memory #(
  parameter int unsigned AW = 11,
  parameter int unsigned WW = 12
) (
  input  logic             clk,
  // finder write port
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_index,
  input  logic [AW-1:0]    wr_first,
  input  logic [WW-1:0]    wr_width,
  // VME port
  input  logic             v_en,
  input  logic             v_we,
  input  logic [AW-1:0]    v_addr,
  input  logic [AW+WW-1:0] v_wdata,
  output logic [AW+WW-1:0] v_rdata
);
  logic [AW+WW-1:0] mem [1 << AW];

  always_ff @(posedge clk) begin
    if (v_en && v_we && !(wr_en && wr_index == v_addr)) mem[v_addr] <= v_wdata;
    if (wr_en) mem[wr_index] <= {wr_first, wr_width};
    if (v_en) v_rdata <= mem[v_addr];
  end
endmodule
