// vn_pkg: shared types and constants of the von Neumann example computer.
//
// The machine is an 8-bit accumulator computer with a single 64-byte memory
// for program and data. An instruction byte holds a 2-bit opcode in bits 7:6
// and a 6-bit memory address (the "immediate") in bits 5:0. Every instruction
// takes three clock steps. Nine control lines, produced by a decoder ROM,
// steer five 2:1 buses and enable writes; their names follow the control
// line names of the original schematic (AC-in Mux, Mem-W, AC-W, IR-W, PC-W,
// M Add Mux, PC Mux, AC-PC Mux, M PC+ Mux).
//
// The opcode assignment (Add 0, Load 1, Save 2, Jump 3) follows the machine's
// opcode table. The select polarities of the AC-PC, M PC+ and PC muxes are
// chosen so that the PC increment step drives exactly the lines shown lit in
// the original schematic during "Increment PC" (PC-W, M Add, AC-PC, M PC+);
// the others are this design's choice. Each is given next to its field.
package vn_pkg;

  localparam int unsigned DATA_W   = 8;
  localparam int unsigned MEM_AW   = 6;   // 64-byte memory
  localparam int unsigned N_STEPS  = 3;   // clock steps per instruction
  localparam int unsigned STEP_W   = 2;

  // Memory-mapped commands, active on a Save to these addresses.
  localparam logic [MEM_AW-1:0] OUT_ADDR  = 6'h3F;
  localparam logic [MEM_AW-1:0] HALT_ADDR = 6'h3E;

  typedef enum logic [1:0] {
    OP_ADD  = 2'b00,   // AC <= AC + M[I], zero flag <= (result == 0)
    OP_LOAD = 2'b01,   // AC <= M[I]
    OP_SAVE = 2'b10,   // M[I] <= AC
    OP_JUMP = 2'b11    // if zero flag: PC <= I
  } vn_opcode_e;

  // Clock step within an instruction.
  typedef enum logic [STEP_W-1:0] {
    ST_FETCH = 2'd0,   // IR <= M[PC]
    ST_INC   = 2'd1,   // PC <= PC + 1 (through the ALU)
    ST_EXEC  = 2'd2    // carry out the instruction
  } vn_step_e;

  // Control word, most significant field first.
  typedef struct packed {
    logic ac_in;    // AC-in Mux:   1 = ALU result, 0 = memory data
    logic mem_w;    // Mem-W:       write AC into M[address]
    logic ac_w;     // AC-W:        write the accumulator
    logic ir_w;     // IR-W:        write the instruction register
    logic pc_w;     // PC-W:        write the program counter
    logic m_add;    // M Add Mux:   1 = IR (immediate) address, 0 = PC address
    logic pc_mux;   // PC Mux:      1 = IR5:0 (jump target), 0 = ALU result
    logic ac_pc;    // AC-PC Mux:   1 = PC to ALU input A, 0 = AC
    logic m_pc_m;   // M PC+ Mux:   1 = constant 1 to ALU input B, 0 = memory data
  } vn_ctrl_t;

endpackage
