// ram_async: a 2**AW x DW memory with a combinational read port and a
// clocked write port, the behaviour of the emulator's memory part (the data
// output follows the address; a write takes effect at the clock edge).
//
// Used for the von Neumann machine's 64-byte shared memory and for the
// Harvard machine's program and data memories. Contents are not reset; a
// program is written into it through the write port before the machine runs.
module ram_async #(
  parameter int unsigned AW = 6,
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
