// frontend_model: behavioural model of one analogue input path for the
// testbenches (front-end output, preamplifier, pedestal adder, fine DAC and
// a 12-bit pipelined FADC with overflow bit). Not synthesizable.
//
// Strip j of the event carries `ped[j] + sig[j]` (in FADC counts). With the
// input enabled the adder subtracts the fine pedestal code, one DAC step
// being one FADC count (the 12-bit configuration), and adds the constant
// baseline BASE left by the coarse pedestal; with the input disabled the
// FADC sees BASE plus the fine pedestal code itself as a test signal.
// Results above 4095 set the overflow bit, results below 0 read 0.
// Timing: on each `convert` the strip converted is the one whose pedestal
// was fetched at the previous convert; results leave a 3-stage pipeline.
module frontend_model #(
  parameter int BASE = 100
) (
  input  logic        clk,
  input  logic        clear,
  input  logic        convert,
  input  logic        input_enable,
  input  logic [7:0]  fine_code,
  output logic [12:0] adc_data
);
  int ped [2048];
  int sig [2048];
  int idx = -1;
  logic [12:0] pipe [3];

  initial begin
    foreach (ped[j]) begin ped[j] = 0; sig[j] = 0; end
    foreach (pipe[k]) pipe[k] = '0;
  end

  function automatic logic [12:0] fadc(input int v);
    if (v > 4095) return 13'h1FFF;
    if (v < 0) return 13'h0000;
    return {1'b0, 12'(v)};
  endfunction

  always @(posedge clk) begin
    if (clear) idx <= -1;
    else if (convert) begin
      int v;
      if (idx >= 0 && idx < 2048)
        v = input_enable ? BASE + ped[idx] + sig[idx] - int'(fine_code) : BASE + int'(fine_code);
      else v = BASE;
      pipe[0] <= fadc(v);
      pipe[1] <= pipe[0];
      pipe[2] <= pipe[1];
      idx <= idx + 1;
    end
  end

  assign adc_data = pipe[2];
endmodule
