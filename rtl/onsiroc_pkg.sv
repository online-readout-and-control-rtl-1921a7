// onsiroc_pkg: constants and types shared by the readout and control module.
//
// Sizes follow the published board: four analogue input channels of 2048
// strips each, a 12-bit FADC whose output is stored with an extra overflow
// bit, 32 analogue pipeline cells in the front-end chip, and a 128K x 32
// sequencer microprogram memory. The sequencer bit assignment, the local
// (internal) bus layout and the VME address map are this design's own
// choices; the published text only fixes SQD4 (pulse shortening), SQD14
// (memory address bit 16) and SQD15 (stop).
package onsiroc_pkg;

  // ---- geometry -----------------------------------------------------------
  localparam int unsigned N_CH        = 4;      // analogue inputs per module
  localparam int unsigned N_STRIPS    = 2048;   // detector channels per input
  localparam int unsigned STRIP_W     = 11;     // log2(N_STRIPS)
  localparam int unsigned ADC_BITS    = 12;     // FADC resolution
  localparam int unsigned SAMPLE_W    = 13;     // sample + overflow bit
  localparam int unsigned N_CELLS     = 32;     // front-end pipeline cells
  localparam int unsigned CELL_W      = 5;      // 5-bit cell counter
  localparam int unsigned PED_W       = 8;      // 8-bit pedestal DACs
  localparam int unsigned WIDTH_W     = 12;     // cluster width 1..2048
  localparam int unsigned SEQ_AW      = 17;     // 128K sequencer words
  localparam int unsigned N_SUPPLIES  = 12;     // 4 groups of Va, Vd, Vb

  // ---- sequencer data bits (SQD0..15) ---------------------------------
  // 0..4 front-end use, 5..10 and 14..15 board internal, 11..13 external.
  localparam int unsigned SQD_FE0      = 0;   // front-end control 0..3
  localparam int unsigned SQD_SHORT    = 4;   // halve high time of SQD1/2
  localparam int unsigned SQD_CONVERT  = 5;   // FADC conversion / step CH1,CH2
  localparam int unsigned SQD_CHCLEAR  = 6;   // clear CH1, CH2, cluster logic
  localparam int unsigned SQD_CELLINC  = 7;   // advance pipeline cell counter
  localparam int unsigned SQD_SCAN     = 8;   // internal, for programs (no logic)
  localparam int unsigned SQD_ROPHASE  = 9;   // internal, for programs (no logic)
  localparam int unsigned SQD_CELLCLR  = 10;  // clear pipeline cell counter
  localparam int unsigned SQD_EXT0     = 11;  // 11..13 free external use
  localparam int unsigned SQD_A16      = 14;  // next address bit 16 (SQA16)
  localparam int unsigned SQD_STOP     = 15;  // stop the sequencer

  // ---- control register 1 bits (Table 1) ----------------------------------
  localparam int unsigned CR1_PED_EN       = 0;
  localparam int unsigned CR1_INT_CLK      = 1;
  localparam int unsigned CR1_INT_RUN      = 2;
  localparam int unsigned CR1_EXT_RUN_DIS  = 3;
  localparam int unsigned CR1_EXT_FC_DIS   = 4;
  localparam int unsigned CR1_FER_EN       = 5;
  localparam int unsigned CR1_EXT_L1_DIS   = 6;
  localparam int unsigned CR1_AUTO_L1      = 7;
  localparam int unsigned CR1_CTRL_EN      = 8;
  localparam int unsigned CR1_IRQ_LVL_LO   = 9;   // 2-bit encoded level
  localparam int unsigned CR1_IVEC_LO      = 11;  // 5-bit vector

  // ---- control register 2 bits --------------------------------------------
  // 0..11: supplies Va1..4, Vd1..4, Vb1..4
  localparam int unsigned CR2_IN_DIS_A     = 12;
  localparam int unsigned CR2_IN_DIS_B     = 13;
  localparam int unsigned CR2_L3REJ_DIS    = 14;
  localparam int unsigned CR2_L3KEEP_DIS   = 15;

  // ---- status register bits -----------------------------------------------
  localparam int unsigned ST_SEQ_RUN   = 0;
  localparam int unsigned ST_SCAN      = 1;
  localparam int unsigned ST_L2_PROMPT = 2;
  localparam int unsigned ST_L2_DELAY  = 3;
  localparam int unsigned ST_FE_READY  = 4;
  localparam int unsigned ST_IRQ       = 5;
  localparam int unsigned ST_L2_KEEP   = 6;
  localparam int unsigned ST_L3_KEEP   = 7;
  localparam int unsigned ST_L3_REJ    = 8;
  localparam int unsigned ST_PS0       = 9;   // 9..12 Va_i and Vd_i on

  // ---- command register bits (write-one pulses) ----------------------------
  localparam int unsigned CMD_RESET_DELAYED = 0;
  localparam int unsigned CMD_START_SCAN    = 1;
  localparam int unsigned CMD_START_RO      = 2;
  localparam int unsigned CMD_START_TEST    = 3;
  localparam int unsigned CMD_CLEAR_IRQ     = 4;
  localparam int unsigned CMD_SOFT_TRIGGER  = 5;
  localparam int unsigned CMD_STOP_SEQ      = 6;

  // ---- local bus ----------------------------------------------------------
  // 22-bit byte address space (4 MB window), 32-bit words.
  localparam int unsigned LA_W = 22;

  typedef struct packed {
    logic            req;    // one-cycle request strobe
    logic            we;     // 1 = write
    logic [LA_W-1:2] addr;   // word address
    logic [3:0]      be;     // byte enables, be[3] = data[31:24]
    logic [31:0]     wdata;
  } lbus_req_t;

  typedef struct packed {
    logic        ack;        // one-cycle completion strobe
    logic [31:0] rdata;
  } lbus_rsp_t;

  // Address map, selected by addr[21:19]
  localparam logic [2:0] MAP_SEQ  = 3'd0;  // 0x000000 sequencer memory
  localparam logic [2:0] MAP_PED  = 3'd2;  // 0x100000 pedestal memories
  localparam logic [2:0] MAP_PED2 = 3'd3;  // 0x180000 (channels 2,3)
  localparam logic [2:0] MAP_RAW  = 3'd4;  // 0x200000 raw data memories
  localparam logic [2:0] MAP_PTR  = 3'd5;  // 0x280000 pointer memories
  localparam logic [2:0] MAP_REG  = 3'd6;  // 0x300000 registers, counters

  // Register word offsets inside MAP_REG (addr[9:2])
  localparam int unsigned R_CR1       = 0;
  localparam int unsigned R_CR2       = 1;
  localparam int unsigned R_STATUS    = 2;
  localparam int unsigned R_CMD       = 3;
  localparam int unsigned R_EVCNT     = 4;
  localparam int unsigned R_SCAN_ADR  = 5;
  localparam int unsigned R_RO_ADR    = 6;
  localparam int unsigned R_TEST_ADR  = 7;
  localparam int unsigned R_THR0      = 8;   // 8..11 thresholds
  localparam int unsigned R_MINW0     = 12;  // 12..15 min. cluster widths
  localparam int unsigned R_COARSE0   = 16;  // 16..19 coarse pedestal DACs
  localparam int unsigned R_BIAS0     = 20;  // 20..23 bias voltage DACs
  localparam int unsigned R_NCLU0     = 24;  // 24..27 cluster counts (RO)
  localparam int unsigned R_CNT0      = 64;  // 64 + 4*ch + {0 CH1, 1 CH2, 2 cell}
  localparam int unsigned R_SEQ_PC    = 32;  // sequencer address (RO)
  localparam int unsigned R_TRIP      = 33;  // supply overload flags (RO)

endpackage
