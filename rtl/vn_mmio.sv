// vn_mmio: the two memory-mapped commands of the von Neumann machine. A Save
// (memory write) to address 0x3F sends the accumulator to the ASCII
// terminal; a Save to 0x3E halts the machine. The memory itself is written
// as well, as in the original, where these decoders only watch the memory's
// write line and address.
//
// Combinational: out_strobe and halt_strobe are high while mem_w is high and
// the address matches; the caller qualifies them with the clock edge.
module vn_mmio
  import vn_pkg::*;
(
  input  logic              mem_w,
  input  logic [MEM_AW-1:0] addr,
  output logic              out_strobe,
  output logic              halt_strobe
);

  assign out_strobe  = mem_w && (addr == OUT_ADDR);
  assign halt_strobe = mem_w && (addr == HALT_ADDR);

endmodule
