// tb_raw_data_memory: self-checking test of the raw data memory.
//
// Fills all 2048 words through the acquisition port with random 13-bit
// samples (overflow bit included), reads every word back over VME with one
// clock latency, overwrites some words over VME, and checks that the
// acquisition port wins a same-word collision.
module tb_raw_data_memory;
  logic clk = 1'b0;
  logic wr_en = 1'b0;
  logic [10:0] wr_addr = '0, v_addr = '0;
  logic [12:0] wr_data = '0, v_wdata = '0, v_rdata;
  logic v_en = 1'b0, v_we = 1'b0;
  logic [12:0] model [2048];
  int checks = 0, failures = 0;

  raw_data_memory dut (.*);
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

  task automatic vread(input int a, input logic [12:0] exp);
    v_en <= 1'b1; v_we <= 1'b0; v_addr <= 11'(a);
    @(posedge clk); v_en <= 1'b0;
    @(negedge clk);
    check(v_rdata == exp, $sformatf("word %0d: %h expected %h", a, v_rdata, exp));
  endtask

  initial begin
    @(posedge clk);
    for (int i = 0; i < 2048; i++) begin
      model[i] = 13'($urandom);
      wr_en <= 1'b1; wr_addr <= 11'(i); wr_data <= model[i];
      @(posedge clk);
    end
    wr_en <= 1'b0;
    for (int i = 0; i < 2048; i++) vread(i, model[i]);
    for (int i = 0; i < 50; i++) begin
      int a;
      a = $urandom_range(2047);
      model[a] = 13'($urandom);
      @(posedge clk);
      v_en <= 1'b1; v_we <= 1'b1; v_addr <= 11'(a); v_wdata <= model[a];
      @(posedge clk); v_en <= 1'b0; v_we <= 1'b0;
      vread(a, model[a]);
    end
    // collision: acquisition wins
    @(posedge clk);
    v_en <= 1'b1; v_we <= 1'b1; v_addr <= 11'd77; v_wdata <= 13'h0AAA;
    wr_en <= 1'b1; wr_addr <= 11'd77; wr_data <= 13'h1555;
    @(posedge clk); v_en <= 1'b0; v_we <= 1'b0; wr_en <= 1'b0;
    vread(77, 13'h1555);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
