// hv_pkg: shared types and constants of the single-cycle Harvard example
// computer.
//
// An instruction byte from the program memory holds a 3-bit opcode in bits
// 7:5 (OC7..OC5) and a 5-bit immediate in bits 4:0; the immediate bus is
// eight bits wide with its top three bits tied to 0. The operation decoder
// ROM turns {zero latch, opcode} into eight control lines DC7..DC0, whose
// meanings follow the original control-line panel. The eight instructions
// themselves, and therefore the ROM contents, are this design's own.
package hv_pkg;

  localparam int unsigned DATA_W = 8;
  localparam int unsigned PC_W   = 8;   // 256-word program memory
  localparam int unsigned DMEM_AW = 8;  // data memory addressed by Imm7..0
  localparam int unsigned IMM_W  = 5;   // immediate bits held in the instruction

  typedef enum logic [2:0] {
    HOP_LOAD  = 3'd0,  // RI <= M[imm]
    HOP_ADD   = 3'd1,  // RO <= RI + M[imm]
    HOP_ADDI  = 3'd2,  // RO <= RI + imm
    HOP_SUB   = 3'd3,  // RO <= RI - M[imm], zero latch <= (result == 0)
    HOP_STORE = 3'd4,  // M[imm] <= RO
    HOP_OUTM  = 3'd5,  // terminal <= M[imm]
    HOP_JZ    = 3'd6,  // if zero latch: next PC <= imm + 1
    HOP_HALT  = 3'd7   // stop the free-running clock
  } hv_opcode_e;

  // Control lines DC7..DC0, most significant first.
  typedef struct packed {
    logic clk_disable; // DC7 Clock Disable: gates the free-running clock off
    logic out_en;      // DC6 Output Enable: terminal takes data memory output
    logic we_dmem;     // DC5 WE Data Mem: M[imm] <= RO
    logic alu_mux;     // DC4 ALU Mux Cont: 1 = data memory to ALU B, 0 = Imm
    logic pc_mux;      // DC3 PC Mux Cont: 1 = increment PC, 0 = jump to Imm
    logic we_ro;       // DC2 WE RO
    logic we_ri;       // DC1 WE RI
    logic alu_cont;    // DC0 ALU Cont: 1 = subtract and latch zero, 0 = add
  } hv_ctrl_t;

endpackage
