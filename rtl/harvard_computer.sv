// harvard_computer: the 8-bit single-cycle Harvard example computer.
//
// A 256-word program memory, read-only to the running program, and a data
// memory are accessed in the same cycle. An instruction holds a 3-bit opcode
// (OC7..OC5) and a 5-bit immediate Imm, zero-extended to 8 bits; Imm is the
// data memory address and the jump target. Two registers surround the math
// ALU: RI (input, loaded from data memory) feeds ALU input A, RO (output,
// loaded from the ALU) feeds the data memory's write data. ALU input B is
// the data memory output or Imm (Mem-Immed mux). A second ALU increments the
// PC, so every instruction completes on one clock edge.
//
// Program counter: the Jump-PC Inc mux picks Imm (jump) or PC, and the
// incrementer adds 1 to the mux output; the PC register loads that sum on
// every clock. A taken jump to Imm therefore resumes at Imm + 1, which
// follows the original wiring: a program places its jump target one word
// before the first instruction to run.
//
// Control: hv_opdecode maps {zero latch, opcode} to DC7..DC0. The mux
// select lines are the inverted DC4 and DC3. The zero latch takes ALU Z when
// DC0 (ALU Cont, subtract) is high. DC6 sends the data memory output to the
// terminal. DC7 turns the free-running clock off (halt); single steps still
// pass, as in the original clock gating.
//
// Clocking: a clock edge of the original is a clk cycle with tick high.
// Program and data are written through the load ports while stopped.
module harvard_computer
  import hv_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  input  logic               step_btn,
  input  logic               pmem_load_we,
  input  logic [PC_W-1:0]    pmem_load_addr,
  input  logic [DATA_W-1:0]  pmem_load_data,
  input  logic               dmem_load_we,
  input  logic [DMEM_AW-1:0] dmem_load_addr,
  input  logic [DATA_W-1:0]  dmem_load_data,
  output logic               out_valid,
  output logic [DATA_W-1:0]  out_char,
  output logic               tick,
  output logic [PC_W-1:0]    pc,
  output logic [DATA_W-1:0]  ri,
  output logic [DATA_W-1:0]  ro,
  output logic               zl,
  output hv_opcode_e         opcode,
  output hv_ctrl_t           dc
);

  logic [DATA_W-1:0]  instr, imm, mem, bin, alu_f;
  logic [PC_W-1:0]    j_pc, pc_next;
  logic               alu_z, alu_c, alu_ov, alu_n;
  logic               inc_c, inc_ov, inc_z, inc_n;
  logic               m_i_mux, j_pc_m;
  logic               dmem_we;
  logic [DMEM_AW-1:0] dmem_addr;
  logic [DATA_W-1:0]  dmem_wdata;

  // Clock: Enable Clk switch gated by DC7 Clock Disable, Clock Pulse button.
  clock_ctrl u_clock (
    .clk, .rst_n, .run, .disable_run(dc.clk_disable), .step_btn, .tick
  );

  // Program memory: written only through the load port.
  ram_async #(.AW(PC_W), .DW(DATA_W)) u_program_mem (
    .clk, .we(pmem_load_we),
    .addr(pmem_load_we ? pmem_load_addr : pc),
    .wdata(pmem_load_data), .rdata(instr)
  );

  assign opcode = hv_opcode_e'(instr[7:5]);
  assign imm    = {{(DATA_W-IMM_W){1'b0}}, instr[IMM_W-1:0]};

  hv_opdecode u_opdecode (.zl, .oc(opcode), .dc);

  assign m_i_mux = !dc.alu_mux;
  assign j_pc_m  = !dc.pc_mux;

  // Program counter and its incrementer ALU.
  mux2_bus #(.W(PC_W)) u_jump_pc_mux (.sel(j_pc_m), .in0(pc), .in1(imm), .y(j_pc));

  alu8 #(.W(PC_W)) u_pc_alu (
    .a(j_pc), .b(PC_W'(1)), .sub(1'b0), .cin(1'b0),
    .f(pc_next), .c(inc_c), .ov(inc_ov), .z(inc_z), .n(inc_n)
  );

  data_reg #(.W(PC_W)) u_pc (.clk, .rst_n, .en(tick), .we(1'b1), .d(pc_next), .q(pc));

  // Data memory, addressed by Imm, written from RO.
  always_comb begin
    if (dmem_load_we) begin
      dmem_we    = 1'b1;
      dmem_addr  = dmem_load_addr;
      dmem_wdata = dmem_load_data;
    end else begin
      dmem_we    = tick && dc.we_dmem;
      dmem_addr  = imm[DMEM_AW-1:0];
      dmem_wdata = ro;
    end
  end

  ram_async #(.AW(DMEM_AW), .DW(DATA_W)) u_data_mem (
    .clk, .we(dmem_we), .addr(dmem_addr), .wdata(dmem_wdata), .rdata(mem)
  );

  // Math datapath.
  data_reg #(.W(DATA_W)) u_ri (.clk, .rst_n, .en(tick), .we(dc.we_ri), .d(mem), .q(ri));

  mux2_bus #(.W(DATA_W)) u_mem_imm_mux (.sel(m_i_mux), .in0(mem), .in1(imm), .y(bin));

  alu8 #(.W(DATA_W)) u_alu (
    .a(ri), .b(bin), .sub(dc.alu_cont), .cin(1'b0),
    .f(alu_f), .c(alu_c), .ov(alu_ov), .z(alu_z), .n(alu_n)
  );

  data_reg #(.W(DATA_W)) u_ro (.clk, .rst_n, .en(tick), .we(dc.we_ro), .d(alu_f), .q(ro));

  flag_ff u_zero_latch (.clk, .rst_n, .en(tick && dc.alu_cont), .d(alu_z), .q(zl));

  // Terminal output.
  assign out_valid = tick && dc.out_en;
  assign out_char  = mem;

endmodule
