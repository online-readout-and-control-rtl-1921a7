// tb_vme_slave: self-checking test of the VME slave and interrupter.
//
// A small VME master (task-level, asynchronous to the slave's clock) runs
// D32 and D16 cycles in A24 and A32 against a local-bus memory model with a
// random answer delay. Checked: data written and read (D16 byte order:
// A1 = 0 is the upper half-word), byte enables, that foreign address
// modifiers, foreign base addresses and single-byte cycles get no DTACK,
// that DTACK is released after the strobes, the IRQ line of the programmed
// level, the vector in the acknowledge cycle with release on acknowledge,
// and daisy-chain pass-through for another level.
module tb_vme_slave;
  import onsiroc_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic as_n = 1, write_n = 1, lword_n = 1, iack_n = 1, iackin_n = 1;
  logic [1:0] ds_n = 2'b11;
  logic [5:0] am = '0;
  logic [31:1] a = '0;
  logic [31:0] d_in = '0, d_out;
  logic d_oe, dtack_n, iackout_n;
  logic [7:1] irq_n;
  logic [1:0] base_a24 = 2'd2;
  logic [9:0] base_a32 = 10'h2A5;
  logic irq_req = 0;
  logic [2:0] irq_level = 3'd5;
  logic [7:0] irq_vector = 8'hC3;
  logic iack_done;
  lbus_req_t lreq;
  lbus_rsp_t lrsp;
  int checks = 0, failures = 0;
  logic [31:0] mem [logic [19:0]];
  int n_iack_done = 0;
  logic [31:0] rd;   // result of the last VME cycle
  bit ack;

  vme_slave dut (.*);
  always #25 clk = ~clk;   // 20 MHz board clock

  // local bus model: answers 1..4 clocks after the request
  initial begin
    lrsp = '0;
    forever begin
      @(posedge clk);
      if (lreq.req) begin
        logic [31:0] old, m;
        logic [19:0] wa;
        wa = lreq.addr[21:2];
        repeat ($urandom_range(3)) @(posedge clk);
        old = mem.exists(wa) ? mem[wa] : 32'h0;
        m = {{8{lreq.be[3]}}, {8{lreq.be[2]}}, {8{lreq.be[1]}}, {8{lreq.be[0]}}};
        if (lreq.we) mem[wa] = (old & ~m) | (lreq.wdata & m);
        lrsp.rdata <= old;
        lrsp.ack <= 1'b1;
        @(posedge clk);
        lrsp.ack <= 1'b0;
      end
    end
  end
  always @(negedge clk) n_iack_done += int'(iack_done);
  int n_pass = 0;
  always @(negedge iackout_n) n_pass++;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // one VME cycle; returns 0 if no DTACK within 2 us
  task automatic vme(input logic [5:0] m, input logic [31:0] adr, input bit wr,
                     input bit d32, input logic [1:0] ds, input logic [31:0] wd);
    am = m; a = adr[31:1]; lword_n = !d32; write_n = !wr; d_in = wd;
    #35ns as_n = 0;
    #10ns ds_n = ds;
    ack = 0;
    fork
      begin wait (!dtack_n); ack = 1; end
      #2us;
    join_any
    disable fork;
    rd = d_out;
    if (ack) check(!wr == d_oe, "data drivers on for reads only");
    ds_n = 2'b11; as_n = 1;
    if (ack) begin
      #300ns check(dtack_n && !d_oe, "DTACK and data released after the strobes");
    end
    #50ns;
  endtask

  initial begin
    #120ns rst = 0;
    #100ns;
    // A24 D32 write and read
    vme(6'h39, 32'h0080_1230, 1, 1, 2'b00, 32'hDEAD_BEEF);
    check(ack, "A24 D32 write acknowledged");
    vme(6'h3D, 32'h0080_1230, 0, 1, 2'b00, 0);
    check(ack && rd == 32'hDEAD_BEEF, $sformatf("A24 D32 read %h", rd));
    // D16: A1=0 upper half, A1=1 lower half
    vme(6'h39, 32'h0080_1232, 1, 0, 2'b00, 32'h0000_1111);
    vme(6'h39, 32'h0080_1230, 0, 0, 2'b00, 0);
    check(ack && rd[15:0] == 16'hDEAD, $sformatf("D16 upper half %h", rd[15:0]));
    vme(6'h39, 32'h0080_1232, 0, 0, 2'b00, 0);
    check(ack && rd[15:0] == 16'h1111, $sformatf("D16 lower half %h", rd[15:0]));
    // A32
    vme(6'h09, 32'hA940_0040, 1, 1, 2'b00, 32'h0BAD_F00D);
    check(ack && mem[20'h00010] == 32'h0BAD_F00D, "A32 D32 write");
    vme(6'h0D, 32'hA940_0040, 0, 1, 2'b00, 0);
    check(ack && rd == 32'h0BAD_F00D, "A32 D32 read");
    // not for this module
    vme(6'h29, 32'h0080_1230, 0, 0, 2'b00, 0);
    check(!ack, "A16 modifier ignored");
    vme(6'h39, 32'h00C0_1230, 0, 1, 2'b00, 0);
    check(!ack, "other A24 base ignored");
    vme(6'h09, 32'hA980_0040, 0, 1, 2'b00, 0);
    check(!ack, "other A32 base ignored");
    vme(6'h39, 32'h0080_1230, 0, 0, 2'b10, 0);
    check(!ack, "single-byte cycle ignored");
    // interrupter
    check(irq_n == 7'h7F, "no interrupt request");
    irq_req = 1;
    #200ns check(irq_n == ~7'(1 << (5 - 1)), $sformatf("IRQ lines %b", irq_n));
    iack_n = 0; iackin_n = 0;
    vme(6'h39, 32'h0000_0006, 0, 0, 2'b00, 0);   // level 3: not ours
    check(!ack && n_pass == 1, "IACK for another level passed on");
    #100ns check(iackout_n, "IACKOUT released with AS");
    vme(6'h39, 32'h0000_000A, 0, 0, 2'b00, 0);   // level 5
    check(ack && rd[7:0] == 8'hC3, $sformatf("vector %h", rd[7:0]));
    check(n_iack_done == 1, "release on acknowledge pulse");
    iack_n = 1; iackin_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
