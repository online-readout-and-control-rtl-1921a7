// tb_sequencer: self-checking test of the microprogrammed sequencer.
//
// Loads a program over the memory port: an endless scan loop in the lower
// half, a readout sequence with a stop word in the upper half and a test
// sequence that crosses halves through SQD14. A reference walk of the same
// program predicts every step. Checked: the SQD word of every step, one step
// every STEP_DIV clocks, the stop pulse and halt, that a readout start
// interrupts the running scan, the 50 % shortening of SQD1/SQD2 by SQD4,
// stepping from the external clock, and memory read-back.
module tb_sequencer;
  localparam int DIV = 2;
  logic clk = 1'b0, rst = 1'b1;
  logic int_clk = 1'b1, ext_clk = 1'b0;
  logic start_scan = 1'b0, start_ro = 1'b0, start_test = 1'b0, halt = 1'b0;
  logic [15:0] scan_addr = 16'h0010, ro_addr = 16'h0100;
  logic [16:0] test_addr = 17'h00200;
  logic p_en = 1'b0, p_we = 1'b0;
  logic [16:0] p_addr = '0;
  logic [31:0] p_wdata = '0, p_rdata;
  logic [15:0] sqd;
  logic stb, running, scan_mode, ro_mode, stopped;
  logic [16:0] pc;
  int checks = 0, failures = 0;
  logic [31:0] prog [int];

  sequencer #(.STEP_DIV(DIV)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // program word: data with bit 14 = next address bit 16
  function automatic logic [31:0] w(input logic [16:0] nxt, input logic [15:0] data);
    logic [15:0] d;
    d = data;
    d[14] = nxt[16];
    return {nxt[15:0], d};
  endfunction

  task automatic pwrite(input logic [16:0] a, input logic [31:0] d);
    p_en <= 1'b1; p_we <= 1'b1; p_addr <= a; p_wdata <= d;
    @(posedge clk); p_en <= 1'b0; p_we <= 1'b0;
    prog[int'(a)] = d;
  endtask

  // wait for the next step strobe, return clocks waited
  task automatic next_step(output int n);
    n = 0;
    do begin @(posedge clk); n++; @(negedge clk); end while (!stb);
  endtask

  task automatic follow(input logic [16:0] start, input int steps, input bit expect_stop,
                        input bit chk_period);
    logic [16:0] a;
    int n, extra;
    a = start;
    extra = 0;
    for (int i = 0; i < steps; i++) begin
      next_step(n);
      if (i > 0 && chk_period) check(n + extra == DIV, $sformatf("step period %0d clocks", n + extra));
      extra = 0;
      check({sqd[15:3], sqd[0]} == {prog[int'(a)][15:3], prog[int'(a)][0]},
            $sformatf("step %0d at %h: sqd %h expected %h", i, a, sqd, prog[int'(a)][15:0]));
      if (prog[int'(a)][4]) begin
        check(sqd[2:1] == prog[int'(a)][2:1], "SQD1/2 high in first half");
        @(negedge clk);
        extra = 1;
        check(sqd[2:1] == 2'b00, "SQD1/2 shortened by SQD4");
      end else check(sqd[2:1] == prog[int'(a)][2:1], "SQD1/2");
      if (prog[int'(a)][15]) begin
        check(expect_stop && stopped, "stop pulse on stop word");
        @(negedge clk);
        check(!running, "halted after stop word");
        return;
      end
      a = {prog[int'(a)][14], prog[int'(a)][31:16]};
    end
    check(!expect_stop, "stop word expected");
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // scan loop 0x10 -> 0x11 -> 0x12 -> 0x10
    pwrite(17'h00010, w(17'h00011, 16'h0101));
    pwrite(17'h00011, w(17'h00012, 16'h0116));   // SQD1,2 with SQD4
    pwrite(17'h00012, w(17'h00010, 16'h0128));
    // readout at 0x10100: 5 steps, then stop
    pwrite(17'h10100, w(17'h10101, 16'h0221));
    pwrite(17'h10101, w(17'h10102, 16'h0263));
    pwrite(17'h10102, w(17'h10103, 16'h0221));
    pwrite(17'h10103, w(17'h10104, 16'h0203));
    pwrite(17'h10104, w(17'h10105, 16'h0840));
    pwrite(17'h10105, w(17'h10105, 16'h8000));
    // test at 0x00200 jumps into the upper half, then stops
    pwrite(17'h00200, w(17'h1F000, 16'h3001));
    pwrite(17'h1F000, w(17'h00000, 16'h8802));
    // read back
    p_en <= 1'b1; p_addr <= 17'h10103; @(posedge clk); p_en <= 1'b0; @(negedge clk);
    check(p_rdata == prog[17'h10103], "memory read-back");

    start_scan <= 1'b1; @(posedge clk); start_scan <= 1'b0;
    follow(17'h00010, 12, 0, 1);
    check(running && scan_mode, "scan running in endless loop");
    // readout start interrupts the scan
    start_ro <= 1'b1; @(posedge clk); start_ro <= 1'b0;
    @(negedge clk); check(ro_mode && !scan_mode, "readout mode after start");
    follow(17'h10100, 20, 1, 1);
    check(!ro_mode && !running, "idle after readout");
    // test sequence
    start_test <= 1'b1; @(posedge clk); start_test <= 1'b0;
    follow(17'h00200, 5, 1, 1);
    // halt
    start_scan <= 1'b1; @(posedge clk); start_scan <= 1'b0;
    follow(17'h00010, 4, 0, 1);
    halt <= 1'b1; @(posedge clk); halt <= 1'b0;
    repeat (8) @(posedge clk);
    @(negedge clk); check(!running && !stb, "halted");
    // external clock: one step per ext_clk period
    int_clk <= 1'b0;
    start_scan <= 1'b1; @(posedge clk); start_scan <= 1'b0;
    fork
      forever begin repeat (5) @(posedge clk); ext_clk <= ~ext_clk; end
    join_none
    follow(17'h00010, 1, 0, 0);
    next_step(n);
    check(n == 10, $sformatf("external clock step period %0d clocks, expected 10", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
