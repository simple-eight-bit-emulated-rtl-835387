// hv_opdecode: the operation decoder of the Harvard machine, a read-only
// table addressed by {zero latch, opcode OC7..OC5} that gives the control
// lines DC7..DC0 for the single clock cycle of the instruction.
//
// The inputs, outputs and line meanings follow the original design. The
// table contents, like the instruction set, are this design's own. Lines
// DC4 (ALU Mux Cont) and DC3 (PC Mux Cont) idle high: DC3 high means "do
// not jump", DC4 high routes the data memory to the ALU. OutM is therefore
// DC6|DC4|DC3. Combinational.
module hv_opdecode
  import hv_pkg::*;
(
  input  logic       zl,
  input  hv_opcode_e oc,
  output hv_ctrl_t   dc
);

  always_comb begin
    dc         = '0;
    dc.alu_mux = 1'b1;
    dc.pc_mux  = 1'b1;
    unique case (oc)
      HOP_LOAD:  dc.we_ri = 1'b1;
      HOP_ADD:   dc.we_ro = 1'b1;
      HOP_ADDI: begin
        dc.we_ro   = 1'b1;
        dc.alu_mux = 1'b0;
      end
      HOP_SUB: begin
        dc.we_ro    = 1'b1;
        dc.alu_cont = 1'b1;
      end
      HOP_STORE: dc.we_dmem    = 1'b1;
      HOP_OUTM:  dc.out_en     = 1'b1;
      HOP_JZ:    dc.pc_mux     = !zl;
      HOP_HALT:  dc.clk_disable = 1'b1;
    endcase
  end

endmodule
