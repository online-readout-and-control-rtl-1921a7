// tb_overload_protection: self-checking test of the overload cut-off.
//
// Uses short monostable times (MM1 = 30 clocks for a 20-clock regulator
// period, MM2 = 500 clocks) and a regulator model that switches in bursts
// under normal load and continuously under overload. Checked: the supply
// stays on through 20 burst cycles, it goes off between MM2 and MM2 + MM1 +
// a few clocks after continuous switching starts, the trip flag, that it
// stays off when the stopped regulator falls silent and when stray bursts
// follow, that switching off clears the trip, that a supply switched on
// without any regulator activity falls off after the start-up interval, and
// that a continuous start-up phase shorter than the fly time is tolerated.
module tb_overload_protection;
  localparam int MM1 = 30, MM2 = 500, PER = 20;
  logic clk = 1'b0, rst = 1'b1, enable = 1'b0, reg_sw = 1'b0;
  logic reg_on, tripped;
  int checks = 0, failures = 0;

  overload_protection #(.MM1_TICKS(MM1), .MM2_TICKS(MM2)) dut (.*);
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

  task automatic sw_cycle();
    reg_sw <= 1'b1; repeat (PER / 2) @(posedge clk);
    reg_sw <= 1'b0; repeat (PER / 2) @(posedge clk);
  endtask

  initial begin
    int t, off_at;
    bit stayed_on;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // normal operation: bursts of 3 switching cycles, then a pause
    enable <= 1'b1;
    stayed_on = 1;
    for (int b = 0; b < 20; b++) begin
      repeat (3) sw_cycle();
      repeat (150) begin @(posedge clk); if (!reg_on) stayed_on = 0; end
      check(stayed_on && !tripped, $sformatf("on after burst %0d", b));
    end
    check(stayed_on && reg_on && !tripped, "stays on under normal load");
    // overload: continuous switching
    t = 0; off_at = -1;
    while (t < 3000) begin
      reg_sw <= 1'b1; repeat (PER / 2) begin @(posedge clk); t++; if (!reg_on && off_at < 0) off_at = t; end
      reg_sw <= 1'b0; repeat (PER / 2) begin @(posedge clk); t++; if (!reg_on && off_at < 0) off_at = t; end
    end
    check(off_at >= MM2 && off_at <= MM2 + MM1 + 2 * PER,
          $sformatf("overload cut-off after %0d clocks", off_at));
    check(tripped && !reg_on, "tripped under overload");
    // the stopped regulator no longer switches: the supply must stay off
    reg_sw <= 1'b0;
    stayed_on = 0;
    repeat (3 * MM1 + 2 * MM2) begin @(posedge clk); if (reg_on) stayed_on = 1; end
    check(!stayed_on && tripped, "stays off after the cut-off");
    // a stray burst after the cut-off does not restart it either
    repeat (3) sw_cycle();
    repeat (100) begin @(posedge clk); if (reg_on) stayed_on = 1; end
    check(!stayed_on && tripped, "a tripped supply ignores later switching");
    // switching off clears, switching on gives the start-up interval
    enable <= 1'b0; repeat (100) @(posedge clk);
    check(!tripped && !reg_on, "off clears trip");
    enable <= 1'b1;
    off_at = -1;
    for (int i = 1; i < 2 * MM2; i++) begin
      @(negedge clk);
      if (!reg_on && off_at < 0 && i > 2) off_at = i;
    end
    check(off_at >= MM2 - 2 && off_at <= MM2 + 2,
          $sformatf("start-up interval %0d clocks", off_at));
    check(tripped, "no activity after start-up trips");
    // power-on phase: continuous switching shorter than the fly time, then
    // normal bursts: the supply must come up and stay on
    enable <= 1'b0; repeat (10) @(posedge clk);
    enable <= 1'b1;
    repeat (MM2 / 2 / PER) sw_cycle();
    stayed_on = 1;
    for (int b = 0; b < 10; b++) begin
      repeat (150) begin @(posedge clk); if (!reg_on) stayed_on = 0; end
      repeat (3) sw_cycle();
    end
    check(stayed_on && !tripped, "start-up switching within the fly time is tolerated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
