// tb_pedestal_memory: self-checking test of the pedestal memory.
//
// Loads random pedestals into random (cell, strip) words over the VME port,
// reads them back over VME, then fetches them through the readout port with
// the cell and CH1 addresses and checks the DAC code one clock later, its
// hold between fetches, and the forced zero with pedestal correction off.
module tb_pedestal_memory;
  logic clk = 1'b0;
  logic fetch = 1'b0, ped_enable = 1'b1;
  logic [4:0] pcell = '0;
  logic [10:0] ch1 = '0;
  logic [7:0] fine_code;
  logic v_en = 1'b0, v_we = 1'b0;
  logic [15:0] v_addr = '0;
  logic [7:0] v_wdata = '0, v_rdata;
  int checks = 0, failures = 0;
  logic [7:0] model [int];

  pedestal_memory dut (.*);
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

  initial begin
    int keys [$];
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      int a;
      logic [7:0] d;
      a = $urandom_range(65535);
      d = 8'($urandom);
      v_en <= 1'b1; v_we <= 1'b1; v_addr <= 16'(a); v_wdata <= d;
      @(posedge clk);
      model[a] = d;
    end
    v_we <= 1'b0;
    foreach (model[k]) keys.push_back(k);
    foreach (keys[i]) begin
      v_en <= 1'b1; v_addr <= 16'(keys[i]);
      @(posedge clk); v_en <= 1'b0;
      @(negedge clk);
      check(v_rdata == model[keys[i]], $sformatf("VME read %h", keys[i]));
      @(posedge clk);
    end
    v_en <= 1'b0;
    // readout port
    foreach (keys[i]) begin
      pcell <= 5'(keys[i] >> 11); ch1 <= 11'(keys[i]); fetch <= 1'b1;
      ped_enable <= 1'(i % 5 != 0);
      @(posedge clk); fetch <= 1'b0; pcell <= '0; ch1 <= '0;
      @(negedge clk);
      check(fine_code == ((i % 5 != 0) ? model[keys[i]] : 8'h00),
            $sformatf("fetch cell %0d strip %0d", keys[i] >> 11, keys[i] & 2047));
      @(posedge clk); @(negedge clk);
      check(fine_code == ((i % 5 != 0) ? model[keys[i]] : 8'h00), "code held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
