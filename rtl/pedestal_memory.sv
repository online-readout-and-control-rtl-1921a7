// pedestal_memory: fine-pedestal store of one analogue input channel.
//
// Holds one 8-bit fine pedestal per strip and per front-end pipeline cell,
// i.e. 32 x 2048 words, so that the pedestal matching the pipeline cell that
// captured the event is subtracted (the analogue subtraction itself happens
// outside, in the adder fed by the fine pedestal DAC). The word address is
// {cell, CH1}. Port A is the readout port: on `fetch` the word at
// {cell, ch1} is read and appears on `fine_code` one clock later, and it is
// held until the next fetch. With `ped_enable` low the DAC code is forced to
// zero (no pedestal correction). Port B is the VME port (read latency one
// clock), used to load pedestals or test patterns that the analogue switch
// can route to the FADC as simulated input signals.
// The 32 x 2048 x 8 size follows the published description; the 8-bit width
// follows the 8-bit fine DAC; the forced-zero behaviour is this design's choice.
module pedestal_memory #(
  parameter int unsigned CELL_W  = 5,
  parameter int unsigned STRIP_W = 11,
  parameter int unsigned PED_W   = 8
) (
  input  logic                      clk,
  // readout port
  input  logic                      fetch,
  input  logic [CELL_W-1:0]         pcell,
  input  logic [STRIP_W-1:0]        ch1,
  input  logic                      ped_enable,
  output logic [PED_W-1:0]          fine_code,
  // VME port
  input  logic                      v_en,
  input  logic                      v_we,
  input  logic [CELL_W+STRIP_W-1:0] v_addr,
  input  logic [PED_W-1:0]          v_wdata,
  output logic [PED_W-1:0]          v_rdata
);
  localparam int unsigned DEPTH = 1 << (CELL_W + STRIP_W);

  logic [PED_W-1:0] mem [DEPTH];
  logic [PED_W-1:0] rd_q;
  logic             en_q;

  always_ff @(posedge clk) begin
    if (fetch) begin
      rd_q <= mem[{pcell, ch1}];
      en_q <= ped_enable;
    end
  end

  assign fine_code = en_q ? rd_q : '0;

  always_ff @(posedge clk) begin
    if (v_en) begin
      if (v_we) mem[v_addr] <= v_wdata;
      v_rdata <= mem[v_addr];
    end
  end
endmodule
