// alu8: W-bit adder/subtractor with the flag outputs of the emulator's ALU
// part (carry C, overflow OV, zero Z, negative N).
//
// sub = 0: {c, f} = a + b + cin.  sub = 1: {c, f} = a + ~b + ~cin, which is
// a - b - cin, with c the "no borrow" carry. Combinational.
//
// Both computers use it: the von Neumann machine for AC + M[I] and for
// PC + 1, the Harvard machine once for PC + 1 and once for the math
// instructions, where the ALU Cont line picks add or subtract. Which
// operation codes the original part has beyond these is not used here.
module alu8 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  input  logic         cin,
  output logic [W-1:0] f,
  output logic         c,
  output logic         ov,
  output logic         z,
  output logic         n
);

  logic [W-1:0] bx;
  logic         cx;

  always_comb begin
    bx      = sub ? ~b : b;
    cx      = cin ^ sub;
    {c, f}  = {1'b0, a} + {1'b0, bx} + {{W{1'b0}}, cx};
    z       = (f == '0);
    n       = f[W-1];
    ov      = (a[W-1] == bx[W-1]) && (f[W-1] != a[W-1]);
  end

endmodule
