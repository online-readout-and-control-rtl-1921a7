// tb_hit_cluster_finder: self-checking test of the hit/cluster finder.
//
// Streams events of 2048 samples with random hit patterns (including
// overflow samples, clusters touching the first and the last strip and
// random gaps in `valid`) and compares every pointer write with a reference
// cluster list computed here from the same samples: first address, width,
// index, and that the write comes one clock after the sample that closed
// the cluster. Hit and cluster counts are checked at the end of each event.
module tb_hit_cluster_finder;
  localparam int N = 2048;
  logic clk = 1'b0, rst = 1'b1, clear = 1'b0, valid = 1'b0;
  logic [10:0] addr = '0;
  logic [12:0] data = '0;
  logic [11:0] threshold, min_width;
  logic        ptr_we;
  logic [10:0] ptr_index, ptr_first;
  logic [11:0] ptr_width;
  logic [11:0] n_clusters, n_hits;
  int checks = 0, failures = 0;

  hit_cluster_finder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [12:0] samp [N];
  int ref_first [$], ref_width [$], ref_close [$];
  int exp_hits;
  int wr_count;
  int close_seen [$];
  int last_idx;  // index of the sample driven in the previous clock

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  function automatic bit is_hit(logic [12:0] d, logic [11:0] thr);
    return d[12] || (d[11:0] > thr);
  endfunction

  task automatic build_ref(input logic [11:0] thr, input logic [11:0] mw);
    int i, start;
    ref_first.delete(); ref_width.delete(); ref_close.delete();
    exp_hits = 0;
    i = 0;
    while (i < N) begin
      if (is_hit(samp[i], thr)) begin
        start = i;
        while (i < N && is_hit(samp[i], thr)) begin exp_hits++; i++; end
        if (i - start > int'(mw)) begin
          ref_first.push_back(start);
          ref_width.push_back(i - start);
          ref_close.push_back(i < N ? i : N - 1);
        end
      end else i++;
    end
  endtask

  // capture pointer writes (sampled mid-cycle, after the driver updated last_idx)
  always @(negedge clk) begin
    if (!rst && ptr_we) begin
      if (wr_count < ref_first.size()) begin
        check(int'(ptr_first) == ref_first[wr_count] && int'(ptr_width) == ref_width[wr_count],
              $sformatf("cluster %0d: got first %0d width %0d, expected %0d/%0d", wr_count,
                        ptr_first, ptr_width, ref_first[wr_count], ref_width[wr_count]));
        check(int'(ptr_index) == wr_count, "pointer index");
        check(last_idx == ref_close[wr_count],
              $sformatf("cluster %0d written %0d samples late", wr_count, last_idx - ref_close[wr_count]));
      end else check(1'b0, "unexpected extra cluster");
      wr_count++;
    end
  end

  task automatic run_event(input int occ_pct, input logic [11:0] thr, input logic [11:0] mw,
                           input bit gaps);
    bit in_run;
    // generate clustered hits
    in_run = 0;
    for (int i = 0; i < N; i++) begin
      if ($urandom_range(99) < (in_run ? 70 : occ_pct)) begin
        in_run = 1;
        samp[i] = ($urandom_range(20) == 0) ? {1'b1, 12'($urandom)} :
                  {1'b0, 12'(int'(thr) + 1 + $urandom_range(4095 - int'(thr) - 1 < 0 ? 0 : 4094 - int'(thr)))};
      end else begin
        in_run = 0;
        samp[i] = {1'b0, 12'($urandom_range(int'(thr)))};
      end
    end
    if (occ_pct > 0) begin
      samp[0] = 13'h0FFF; samp[N-1] = 13'h0FFF;  // edge clusters
    end
    threshold = thr; min_width = mw;
    build_ref(thr, mw);
    wr_count = 0;
    @(posedge clk); clear <= 1'b1; @(posedge clk); clear <= 1'b0;
    last_idx = -1;
    for (int i = 0; i < N; i++) begin
      while (gaps && $urandom_range(3) == 0) begin
        valid <= 1'b0; @(posedge clk);
        last_idx = -1;
      end
      valid <= 1'b1; addr <= 11'(i); data <= samp[i];
      @(posedge clk);
      last_idx = i;
    end
    valid <= 1'b0;
    @(posedge clk); last_idx = -1;
    repeat (3) @(posedge clk);
    check(wr_count == ref_first.size(),
          $sformatf("cluster count %0d expected %0d", wr_count, ref_first.size()));
    check(int'(n_clusters) == ref_first.size(), "n_clusters");
    check(int'(n_hits) == exp_hits, $sformatf("n_hits %0d expected %0d", n_hits, exp_hits));
  endtask

  initial begin
    threshold = 12'd100; min_width = 12'd0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    run_event(10, 12'd100, 12'd0, 0);
    run_event(10, 12'd2000, 12'd1, 1);
    run_event(30, 12'd500, 12'd2, 0);
    run_event(0, 12'd4095, 12'd0, 0);       // no hits at all
    run_event(90, 12'd50, 12'd3, 1);
    for (int k = 0; k < 4; k++)
      run_event($urandom_range(40), 12'($urandom_range(3000)), 12'($urandom_range(4)), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
