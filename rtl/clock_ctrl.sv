// clock_ctrl: the clock controls of both example computers. A free-running
// clock reaches the machine while the run switch is on and the machine does
// not disable it (halt); a press of the single-step button gives exactly one
// clock edge whether or not the machine is running.
//
// In this synchronous version the emulated clock edge is a one-cycle enable,
// tick, of the real clock clk: tick = (run & ~disable_run) | rising edge of
// step_btn. step_btn is sampled once per clk; the button is assumed to be
// free of bounce (the edge detector is this design's choice).
module clock_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  input  logic disable_run,
  input  logic step_btn,
  output logic tick
);

  logic step_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) step_q <= 1'b0;
    else        step_q <= step_btn;
  end

  assign tick = (run && !disable_run) || (step_btn && !step_q);

endmodule
