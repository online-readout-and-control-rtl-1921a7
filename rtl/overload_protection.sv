// overload_protection: overload cut-off for one switching power supply.
//
// A clocked equivalent of the two retriggerable monostables of the board.
// MM1 is restarted by every falling edge of the regulator's switching output
// `reg_sw` and holds for MM1_TICKS (chosen between one and two regulator
// oscillator periods). Under normal load the regulator switches in bursts,
// so MM1 drops between bursts and rises again with the next burst; under
// overload the regulator switches continuously and MM1 stays high. MM2 is
// restarted by each rising edge of MM1 and by switching the supply on
// (`enable` rising, which gives the start-up insensitivity interval); it
// holds for MM2_TICKS (the fly time). Its output is the regulator ON/OFF
// control `reg_on`. If MM2 is not retriggered within its fly time it falls
// back and the regulator stops. The supply then stays off, and `tripped`
// stays set, until it is switched off and on again with `enable`: the
// falling MM1 edge that follows when the regulator stops does not restart
// MM2, and a tripped supply ignores further activity on `reg_sw`.
// Timing: `reg_sw` is synchronised with two flops, so edges are seen two to
// three clocks late. The two-monostable principle follows the published
// circuit. This design's choices: MM2 triggers on the rising edge of MM1
// only, a trip is held until re-enable, and the tick counts (for an 80 MHz
// clock: 100 kHz regulator, 1.5 periods for MM1, 1 ms fly time).
module overload_protection #(
  parameter int unsigned MM1_TICKS = 1200,
  parameter int unsigned MM2_TICKS = 80000
) (
  input  logic clk,
  input  logic rst,
  input  logic enable,
  input  logic reg_sw,
  output logic reg_on,
  output logic tripped
);
  localparam int unsigned W1 = $clog2(MM1_TICKS + 1);
  localparam int unsigned W2 = $clog2(MM2_TICKS + 1);

  logic [2:0]    sw_s;
  logic          en_q, mm1_q;
  logic [W1-1:0] cnt1;
  logic [W2-1:0] cnt2;
  logic          mm1, mm2, mm1_rise;

  assign mm1 = (cnt1 != '0);
  assign mm2 = (cnt2 != '0);
  assign mm1_rise = mm1 && !mm1_q;
  assign reg_on = enable && mm2;

  always_ff @(posedge clk) begin
    if (rst) begin
      sw_s <= '0; en_q <= 1'b0; mm1_q <= 1'b0;
      cnt1 <= '0; cnt2 <= '0; tripped <= 1'b0;
    end else begin
      sw_s  <= {sw_s[1:0], reg_sw};
      en_q  <= enable;
      mm1_q <= mm1;
      // MM1: retriggered by each falling edge of the switching output
      if (sw_s[2] && !sw_s[1]) cnt1 <= W1'(MM1_TICKS);
      else if (mm1)            cnt1 <= cnt1 - 1'b1;
      // MM2: retriggered by each rising edge of MM1 and by switching on
      if (!enable)                           cnt2 <= '0;
      else if (!en_q || (mm1_rise && !tripped)) cnt2 <= W2'(MM2_TICKS);
      else if (mm2)                          cnt2 <= cnt2 - 1'b1;
      // trip flag: MM2 ran out while the supply was enabled
      if (!enable)                                  tripped <= 1'b0;
      else if (en_q && cnt2 == W2'(1) && !mm1_rise) tripped <= 1'b1;
    end
  end
endmodule
