// tb_channel_counters: self-checking test of CH1, CH2 and the cell counter.
//
// Issues 2048 + DELAY + 3 conversion steps with random idle clocks between
// them and checks, per step, the fetch and write strobes and both counter
// values against the expected schedule (CH2 = step - DELAY), that exactly
// 2048 fetches and 2048 writes occur, the busy flag, the cell counter and
// the VME load of each counter.
module tb_channel_counters;
  localparam int DELAY = 4;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, step = 1'b0;
  logic cell_inc = 1'b0, cell_clr = 1'b0;
  logic ld_en = 1'b0;
  logic [1:0] ld_sel = '0;
  logic [15:0] ld_val = '0;
  logic [10:0] ch1, ch2;
  logic [4:0] pcell;
  logic fetch, wr_en, busy;
  int checks = 0, failures = 0;

  channel_counters #(.DELAY(DELAY)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int nf, nw, gap;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int ev = 0; ev < 2; ev++) begin
      clear <= 1'b1; @(posedge clk); clear <= 1'b0;
      nf = 0; nw = 0;
      for (int k = 0; k < 2048 + DELAY + 3; k++) begin
        gap = $urandom_range(2);
        if (gap > 0) begin
          step <= 1'b0;
          repeat (gap) @(posedge clk);
        end
        step <= 1'b1;
        @(negedge clk);
        check(fetch == (k < 2048), $sformatf("fetch at step %0d", k));
        if (k < 2048) check(int'(ch1) == k, $sformatf("CH1 %0d at step %0d", ch1, k));
        check(wr_en == (k >= DELAY && k < 2048 + DELAY), $sformatf("wr_en at step %0d", k));
        if (wr_en) check(int'(ch2) == k - DELAY, $sformatf("CH2 %0d at step %0d", ch2, k));
        if (k == 10) check(busy, "busy during scan");
        nf += int'(fetch); nw += int'(wr_en);
        @(posedge clk);
      end
      step <= 1'b0;
      @(negedge clk);
      check(!busy, "busy after scan");
      check(nf == 2048 && nw == 2048, $sformatf("fetches %0d writes %0d", nf, nw));
    end
    // cell counter
    cell_clr <= 1'b1; @(posedge clk); cell_clr <= 1'b0;
    repeat (37) begin cell_inc <= 1'b1; @(posedge clk); end
    cell_inc <= 1'b0; @(negedge clk);
    check(pcell == 5'd5, $sformatf("cell counter %0d, expected 5 (37 mod 32)", pcell));
    // VME loads
    ld_en <= 1'b1; ld_sel <= 2'd0; ld_val <= 16'd1234; @(posedge clk);
    ld_sel <= 2'd1; ld_val <= 16'd777; @(posedge clk);
    ld_sel <= 2'd2; ld_val <= 16'd19; @(posedge clk);
    ld_en <= 1'b0; @(negedge clk);
    check(ch1 == 11'd1234 && ch2 == 11'd777 && pcell == 5'd19, "VME loads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
