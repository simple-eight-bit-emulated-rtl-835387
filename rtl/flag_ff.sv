// flag_ff: a one-bit flag flip-flop with enable: the zero flag ("Flip") of
// the von Neumann machine and the Zero Latch of the Harvard machine.
//
// q takes d on a rising clk edge when en is high; in both machines d is the
// ALU's Z output and en is the emulated clock edge qualified by the control
// lines that mark an arithmetic instruction. rst_n clears it asynchronously.
module flag_ff (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= 1'b0;
    else if (en) q <= d;
  end

endmodule
