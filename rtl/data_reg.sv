// data_reg: a W-bit register with write enable, the "one-word memory" used
// for every program-visible register of both example computers (PC, AC and
// IR of the von Neumann machine; PC, RI and RO of the Harvard machine).
//
// q takes d on a rising clk edge when both en (the emulated clock edge) and
// we (the register's write control line) are high. rst_n clears it
// asynchronously; the reset value is this design's choice, the original
// registers being cleared by the emulator at start-up.
module data_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic         we,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (en && we) q <= d;
  end

endmodule
