// tb_pointer_memory: self-checking test of the pointer memory.
//
// Writes random clusters {first, width} through the finder port, reads them
// back over VME in the packed layout {first[22:12], width[11:0]}, and checks
// VME writes and the finder-wins collision rule.
module tb_pointer_memory;
  logic clk = 1'b0;
  logic wr_en = 1'b0;
  logic [10:0] wr_index = '0, wr_first = '0, v_addr = '0;
  logic [11:0] wr_width = '0;
  logic v_en = 1'b0, v_we = 1'b0;
  logic [22:0] v_wdata = '0, v_rdata;
  logic [22:0] model [2048];
  int checks = 0, failures = 0;

  pointer_memory dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic vread(input int a, input logic [22:0] exp);
    v_en <= 1'b1; v_we <= 1'b0; v_addr <= 11'(a);
    @(posedge clk); v_en <= 1'b0;
    @(negedge clk);
    check(v_rdata == exp, $sformatf("word %0d: %h expected %h", a, v_rdata, exp));
  endtask

  initial begin
    logic [10:0] f;
    logic [11:0] w;
    @(posedge clk);
    for (int i = 0; i < 2048; i++) begin
      f = 11'($urandom); w = 12'($urandom_range(1, 2048));
      model[i] = {f, w};
      wr_en <= 1'b1; wr_index <= 11'(i); wr_first <= f; wr_width <= w;
      @(posedge clk);
    end
    wr_en <= 1'b0;
    for (int i = 0; i < 2048; i++) vread(i, model[i]);
    for (int i = 0; i < 20; i++) begin
      int a;
      a = $urandom_range(2047);
      model[a] = 23'($urandom);
      v_en <= 1'b1; v_we <= 1'b1; v_addr <= 11'(a); v_wdata <= model[a];
      @(posedge clk); v_en <= 1'b0; v_we <= 1'b0;
      vread(a, model[a]);
    end
    v_en <= 1'b1; v_we <= 1'b1; v_addr <= 11'd5; v_wdata <= 23'h7FFFFF;
    wr_en <= 1'b1; wr_index <= 11'd5; wr_first <= 11'd9; wr_width <= 12'd3;
    @(posedge clk); v_en <= 1'b0; v_we <= 1'b0; wr_en <= 1'b0;
    vread(5, {11'd9, 12'd3});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
