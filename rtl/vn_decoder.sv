// vn_decoder: the instruction decoder of the von Neumann machine, a
// read-only table addressed by {opcode (IR7:6), zero flag, step count} that
// gives the nine control lines for the current clock step.
//
// The decoder's inputs and outputs are those of the original design; its
// contents are this design's own micro-sequence, three steps per
// instruction:
//   step 0  fetch:     M Add Mux = PC, IR-W           (IR <= M[PC])
//   step 1  increment: AC-PC = PC, M PC+ = 1, PC-W   (PC <= PC + 1 via ALU);
//                      M Add is also high, as in the original's display of
//                      this step, which does not matter for the result
//   step 2  execute:
//     Add   M Add = IR, AC-PC = AC, M PC+ = mem, AC-in = ALU, AC-W
//     Load  M Add = IR, AC-in = mem, AC-W
//     Save  M Add = IR, Mem-W
//     Jump  PC Mux = IR, PC-W only when the zero flag is set
// The unused step value 3 drives every line low. Combinational.
module vn_decoder
  import vn_pkg::*;
(
  input  vn_opcode_e          opcode,
  input  logic                flip,
  input  logic [STEP_W-1:0]   step,
  output vn_ctrl_t            ctrl
);

  always_comb begin
    ctrl = '0;
    unique case (step)
      ST_FETCH: begin
        ctrl.m_add = 1'b0;
        ctrl.ir_w  = 1'b1;
      end
      ST_INC: begin
        ctrl.ac_pc  = 1'b1;
        ctrl.m_pc_m = 1'b1;
        ctrl.m_add  = 1'b1;
        ctrl.pc_mux = 1'b0;
        ctrl.pc_w   = 1'b1;
      end
      ST_EXEC: begin
        unique case (opcode)
          OP_ADD: begin
            ctrl.m_add  = 1'b1;
            ctrl.ac_pc  = 1'b0;
            ctrl.m_pc_m = 1'b0;
            ctrl.ac_in  = 1'b1;
            ctrl.ac_w   = 1'b1;
          end
          OP_LOAD: begin
            ctrl.m_add = 1'b1;
            ctrl.ac_in = 1'b0;
            ctrl.ac_w  = 1'b1;
          end
          OP_SAVE: begin
            ctrl.m_add = 1'b1;
            ctrl.mem_w = 1'b1;
          end
          OP_JUMP: begin
            ctrl.pc_mux = flip;
            ctrl.pc_w   = flip;
          end
        endcase
      end
      default: ctrl = '0;
    endcase
  end

endmodule
