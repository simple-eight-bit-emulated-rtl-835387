// step_counter: counts the clock steps of a multi-cycle instruction,
// 0, 1, ..., STEPS-1, 0, ... (three steps in the von Neumann machine).
//
// The count advances on a rising clk edge when en (the emulated clock edge)
// is high and is cleared asynchronously by rst_n. The original counter part
// is cleared by a gate when it reaches the step count; here the wrap is
// written directly. An assertion checks that the count stays in range; it
// uses rst_n as its disable condition, which lint reports as a reset used
// both asynchronously and synchronously. The flip-flops themselves only use
// it asynchronously.
module step_counter #(
  parameter int unsigned STEPS = 3,
  parameter int unsigned SW    = (STEPS > 1) ? $clog2(STEPS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [SW-1:0] step
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          step <= '0;
    else if (en) begin
      if (step == SW'(STEPS - 1))        step <= '0;
      else                               step <= step + 1'b1;
    end
  end

  // The count never leaves 0..STEPS-1.
  a_step_range: assert property (@(posedge clk) disable iff (!rst_n) int'(step) < int'(STEPS))
    else $error("step_counter: step %0d out of range", step);

endmodule
