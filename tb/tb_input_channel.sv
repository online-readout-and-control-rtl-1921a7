// tb_input_channel: self-checking test of one complete input channel.
//
// Loads the pedestals of one pipeline cell over the VME port, sets the cell
// counter, and digitises an event of 2048 strips through the behavioural
// analogue path (pedestals plus random clustered signals, conversions every
// second clock as the sequencer makes them). The raw data memory must hold
// the pedestal-corrected samples (baseline + signal), the pointer memory the
// clusters computed here from those samples. A second event without
// pedestal correction and a third in test mode (input disabled: the fine
// pedestal becomes the signal) check the other paths. The number of
// conversions needed (2048 + DELAY) is checked too.
module tb_input_channel;
  import onsiroc_pkg::*;
  localparam int BASE = 100, DELAY = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic clear = 0, step = 0, cell_inc = 0, cell_clr = 0, ped_enable = 1;
  logic [11:0] threshold = 12'd160, min_width = 12'd1;
  logic [12:0] adc_data;
  logic [7:0] fine_code;
  logic v_en = 0, v_we = 0;
  logic [1:0] v_sel = '0;
  logic [15:0] v_addr = '0;
  logic [31:0] v_wdata = '0, v_rdata;
  logic [11:0] n_clusters, n_hits;
  logic busy;
  logic input_enable = 1;
  int checks = 0, failures = 0;
  int exp_raw [2048];

  input_channel #(.DELAY(DELAY)) dut (.*);
  frontend_model #(.BASE(BASE)) fe (.clk, .clear, .convert(step), .input_enable,
                                    .fine_code, .adc_data);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic vwr(input logic [1:0] sel, input int a, input logic [31:0] d);
    @(negedge clk); v_en = 1; v_we = 1; v_sel = sel; v_addr = 16'(a); v_wdata = d;
    @(negedge clk); v_en = 0; v_we = 0;
  endtask

  task automatic vrd(input logic [1:0] sel, input int a, output logic [31:0] d);
    @(negedge clk); v_en = 1; v_we = 0; v_sel = sel; v_addr = 16'(a);
    @(negedge clk); v_en = 0; d = v_rdata;
  endtask

  task automatic acquire(output int nsteps);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    nsteps = 0;
    do begin
      step = 1; @(negedge clk); step = 0; @(negedge clk);
      nsteps++;
    end while (busy || nsteps < 2);
  endtask

  task automatic verify(input string tag);
    logic [31:0] d;
    int nerr, i, start, ncl;
    nerr = 0;
    for (int j = 0; j < 2048; j++) begin
      vrd(2'd1, j, d);
      if (d[12:0] != 13'(exp_raw[j] > 4095 ? 13'h1FFF : exp_raw[j])) nerr++;
    end
    check(nerr == 0, $sformatf("%s: %0d raw words wrong", tag, nerr));
    // reference clusters from the expected raw data
    i = 0; ncl = 0;
    while (i < 2048) begin
      if (exp_raw[i] > int'(threshold)) begin
        start = i;
        while (i < 2048 && exp_raw[i] > int'(threshold)) i++;
        if (i - start > int'(min_width)) begin
          vrd(2'd2, ncl, d);
          check(d[22:12] == 11'(start) && d[11:0] == 12'(i - start),
                $sformatf("%s: cluster %0d = %0d/%0d, expected %0d/%0d", tag, ncl,
                          d[22:12], d[11:0], start, i - start));
          ncl++;
        end
      end else i++;
    end
    check(int'(n_clusters) == ncl, $sformatf("%s: %0d clusters, expected %0d", tag, n_clusters, ncl));
  endtask

  initial begin
    int n;
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst = 0;
    // event cell 13: cell counter via VME
    vwr(2'd3, 2, 32'd13);
    vrd(2'd3, 2, d);
    check(d == 32'd13, "cell counter read-back");
    for (int j = 0; j < 2048; j++) begin
      fe.ped[j] = $urandom_range(255);
      vwr(2'd0, (13 << 11) | j, 32'(fe.ped[j]));
      vwr(2'd0, (12 << 11) | j, 32'(255 - fe.ped[j]));  // another cell, must not be used
    end
    for (int j = 0; j < 2048; j++) begin
      fe.sig[j] = ($urandom_range(9) == 0) ? 100 + $urandom_range(3000) : $urandom_range(40);
      if (j >= 2045) fe.sig[j] = 500;   // cluster at the end
    end
    acquire(n);
    check(n == 2048 + DELAY, $sformatf("acquisition took %0d conversions", n));
    for (int j = 0; j < 2048; j++) exp_raw[j] = BASE + fe.sig[j];
    verify("corrected");
    // without pedestal correction
    ped_enable = 0; threshold = 12'd300; min_width = 12'd0;
    acquire(n);
    for (int j = 0; j < 2048; j++) exp_raw[j] = BASE + fe.sig[j] + fe.ped[j];
    verify("uncorrected");
    // test mode: input disabled, the fine pedestal is the signal
    ped_enable = 1; input_enable = 0; threshold = 12'd250;
    acquire(n);
    for (int j = 0; j < 2048; j++) exp_raw[j] = BASE + fe.ped[j];
    verify("test pattern");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
