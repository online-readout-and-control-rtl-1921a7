// vme_slave: VME bus slave and interrupter of the module.
//
// Accepts standard (A24, address modifiers 0x39/0x3D) and extended (A32,
// 0x09/0x0D) data cycles that fall into the module's 4 MB window, selected
// by the A24 base (A[23:22]) or the A32 base (A[31:22]). Transfers are
// double byte (D16: LWORD* high, both data strobes) or quad byte (D32:
// LWORD* low, A1 low, both strobes); other cycles are not acknowledged.
// Each accepted cycle becomes one local bus request; when the local bus
// answers, read data are driven and DTACK* is pulled low until the master
// releases the data strobes. D16 follows VME byte order: A1 = 0 addresses
// the upper half of a 32-bit word.
// The interrupter pulls IRQ*[level] (level 1..7) while `irq_req` is set; in
// the matching interrupt acknowledge cycle with IACKIN* low it returns the
// 8-bit vector and pulses `iack_done` (release on acknowledge). Otherwise it
// passes IACKIN* on to IACKOUT*.
// All bus inputs are sampled with two flops on the board clock, so the
// logic is fully synchronous. A data cycle is decoded once, when both
// strobes are seen; the slave then waits for AS* to be seen high before it
// decodes again, because the synchronised strobes lag the bus by two clocks
// and the master may already present the next address. The address
// modifiers, D16/D32 and level 1..7 interrupts follow the published
// interface description; window size, supported codes and timing are this
// design's choices.
module vme_slave
  import onsiroc_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // VME bus (active-low signals end in _n)
  input  logic        as_n,
  input  logic [1:0]  ds_n,
  input  logic        write_n,
  input  logic        lword_n,
  input  logic [5:0]  am,
  input  logic [31:1] a,
  input  logic [31:0] d_in,
  output logic [31:0] d_out,
  output logic        d_oe,
  output logic        dtack_n,
  input  logic        iack_n,
  input  logic        iackin_n,
  output logic        iackout_n,
  output logic [7:1]  irq_n,
  // board configuration
  input  logic [1:0]  base_a24,
  input  logic [9:0]  base_a32,
  // interrupter
  input  logic        irq_req,
  input  logic [2:0]  irq_level,
  input  logic [7:0]  irq_vector,
  output logic        iack_done,
  // local bus master
  output lbus_req_t   lreq,
  input  lbus_rsp_t   lrsp
);
  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_DTACK, S_PASS, S_SKIP} state_t;
  state_t state;

  logic [1:0] as_s, ds0_s, ds1_s;
  logic       as_a, ds_a, ds_both, ds_none;
  logic       a24, a32, hit, d32, d16, irq_on;
  logic       half_q, rd_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      as_s <= '1; ds0_s <= '1; ds1_s <= '1;
    end else begin
      as_s  <= {as_s[0], as_n};
      ds0_s <= {ds0_s[0], ds_n[0]};
      ds1_s <= {ds1_s[0], ds_n[1]};
    end
  end

  assign as_a    = !as_s[1];
  assign ds_a    = !ds0_s[1] || !ds1_s[1];
  assign ds_both = !ds0_s[1] && !ds1_s[1];
  assign ds_none = ds0_s[1] && ds1_s[1];

  assign a24 = (am == 6'h39 || am == 6'h3D) && a[23:22] == base_a24;
  assign a32 = (am == 6'h09 || am == 6'h0D) && a[31:22] == base_a32;
  assign d32 = !lword_n && !a[1] && ds_both;
  assign d16 = lword_n && ds_both;
  assign hit = iack_n && (a24 || a32) && (d32 || d16);

  assign irq_on = irq_req && irq_level != 3'd0;
  always_comb begin
    irq_n = '1;
    for (int l = 1; l <= 7; l++)
      if (irq_on && irq_level == 3'(l)) irq_n[l] = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      lreq      <= '0;
      d_out     <= '0;
      d_oe      <= 1'b0;
      dtack_n   <= 1'b1;
      iackout_n <= 1'b1;
      iack_done <= 1'b0;
      half_q    <= 1'b0;
      rd_q      <= 1'b0;
    end else begin
      lreq.req  <= 1'b0;
      iack_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (as_a && ds_a) begin
            if (!iack_n) begin
              // interrupt acknowledge: A3..1 carry the level
              if (!iackin_n && irq_on && a[3:1] == irq_level) begin
                d_out     <= {24'h0, irq_vector};
                d_oe      <= 1'b1;
                dtack_n   <= 1'b0;
                iack_done <= 1'b1;
                state     <= S_DTACK;
              end else if (!iackin_n) begin
                iackout_n <= 1'b0;
                state     <= S_PASS;
              end
            end else if (!ds_both) begin
              // wait for the second strobe (skew), or a single-byte cycle
            end else if (hit) begin
              lreq.req   <= 1'b1;
              lreq.we    <= !write_n;
              lreq.addr  <= a[LA_W-1:2];
              lreq.be    <= d32 ? 4'b1111 : (a[1] ? 4'b0011 : 4'b1100);
              lreq.wdata <= d32 ? d_in : {d_in[15:0], d_in[15:0]};
              half_q     <= d16;
              rd_q       <= write_n;
              state      <= S_WAIT;
            end else begin
              state      <= S_SKIP;   // not for this module
            end
          end
        end
        S_WAIT: begin
          if (lrsp.ack) begin
            if (!half_q)             d_out <= lrsp.rdata;
            else if (lreq.be[3])     d_out <= {16'h0, lrsp.rdata[31:16]};
            else                     d_out <= {16'h0, lrsp.rdata[15:0]};
            d_oe    <= rd_q;
            dtack_n <= 1'b0;
            state   <= S_DTACK;
          end
        end
        S_DTACK: begin
          if (ds_none) begin
            dtack_n <= 1'b1;
            d_oe    <= 1'b0;
            state   <= S_SKIP;
          end
        end
        S_SKIP: begin
          // a decided cycle ends only when AS is seen released, so a new
          // address on the bus during the synchroniser delay is not decoded
          if (!as_a) state <= S_IDLE;
        end
        S_PASS: begin
          if (!as_a) begin
            iackout_n <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_dtack_after_strobe: assert property (@(posedge clk) disable iff (rst)
    $fell(dtack_n) |-> ds_a)
    else $error("vme_slave: DTACK without data strobe");
endmodule
