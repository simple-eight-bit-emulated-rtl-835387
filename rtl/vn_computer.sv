// vn_computer: the 8-bit accumulator von Neumann example computer.
//
// One 64-byte memory holds program and data. Four instructions, selected by
// IR7:6: Add (AC <= AC + M[I], zero flag <= result == 0), Load
// (AC <= M[I]), Save (M[I] <= AC) and Jump (PC <= I if the zero flag is
// set), where I = IR5:0. A Save to 0x3F prints the accumulator on the
// terminal and a Save to 0x3E halts the machine. Each instruction takes
// three emulated clock edges: fetch, PC increment, execute (vn_decoder).
//
// Datapath (as in the original schematic): a single adder serves both the
// accumulator and the PC. Its A input comes from the AC-PC mux (AC or PC),
// its B input from the M PC+ mux (memory data or the constant 1). The memory
// address comes from the M Add mux (PC or IR), the AC input from the AC-in
// mux (ALU or memory), the PC input from the PC mux (ALU or IR5:0). The zero
// flag takes the ALU's Z output on the step where AC-in, AC-W and M Add are
// all high, which is the execute step of an Add.
//
// Clocking: everything runs on clk; an emulated clock edge is a cycle with
// tick high, given by the Run switch (run) or one press of the single-step
// button (step_btn). A halt stops the run clock until reset (this latch is
// this design's choice); single steps still pass.
//
// Program loading: while the machine is stopped, load_we writes load_data to
// M[load_addr]. out_valid is high for the tick on which a character leaves
// on out_char.
module vn_computer
  import vn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              run,
  input  logic              step_btn,
  input  logic              load_we,
  input  logic [MEM_AW-1:0] load_addr,
  input  logic [DATA_W-1:0] load_data,
  output logic              out_valid,
  output logic [DATA_W-1:0] out_char,
  output logic              halted,
  output logic              tick,
  output logic [DATA_W-1:0] pc,
  output logic [DATA_W-1:0] ac,
  output logic [DATA_W-1:0] ir,
  output logic [STEP_W-1:0] step,
  output logic              flip,
  output vn_ctrl_t          ctrl
);

  logic [DATA_W-1:0] mem_rdata, mem_addr_bus, alu_a, alu_b, alu_f;
  logic [DATA_W-1:0] ac_d, pc_d, imm;
  logic              alu_c, alu_ov, alu_z, alu_n;
  logic              out_strobe, halt_strobe;
  logic              mem_we;
  logic [MEM_AW-1:0] mem_addr;
  logic [DATA_W-1:0] mem_wdata;

  // Clock: Run Clock switch, halt, Single Step button.
  clock_ctrl u_clock (
    .clk, .rst_n, .run, .disable_run(halted), .step_btn, .tick
  );

  step_counter #(.STEPS(N_STEPS), .SW(STEP_W)) u_step (
    .clk, .rst_n, .en(tick), .step
  );

  vn_decoder u_decoder (
    .opcode(vn_opcode_e'(ir[7:6])), .flip, .step, .ctrl
  );

  assign imm = {2'b00, ir[5:0]};

  // Multiplexer array.
  mux2_bus #(.W(DATA_W)) u_mem_add_mux (.sel(ctrl.m_add),  .in0(pc),    .in1(ir),    .y(mem_addr_bus));
  mux2_bus #(.W(DATA_W)) u_ac_pc_mux   (.sel(ctrl.ac_pc),  .in0(ac),    .in1(pc),    .y(alu_a));
  mux2_bus #(.W(DATA_W)) u_mem_pc_mux  (.sel(ctrl.m_pc_m), .in0(mem_rdata), .in1(8'd1), .y(alu_b));
  mux2_bus #(.W(DATA_W)) u_ac_in_mux   (.sel(ctrl.ac_in),  .in0(mem_rdata), .in1(alu_f), .y(ac_d));
  mux2_bus #(.W(DATA_W)) u_pc_mux      (.sel(ctrl.pc_mux), .in0(alu_f), .in1(imm),   .y(pc_d));

  alu8 #(.W(DATA_W)) u_alu (
    .a(alu_a), .b(alu_b), .sub(1'b0), .cin(1'b0),
    .f(alu_f), .c(alu_c), .ov(alu_ov), .z(alu_z), .n(alu_n)
  );

  // Memory, shared by program and data; the load port has the write side
  // while load_we is high.
  always_comb begin
    if (load_we) begin
      mem_we    = 1'b1;
      mem_addr  = load_addr;
      mem_wdata = load_data;
    end else begin
      mem_we    = tick && ctrl.mem_w;
      mem_addr  = mem_addr_bus[MEM_AW-1:0];
      mem_wdata = ac;
    end
  end

  ram_async #(.AW(MEM_AW), .DW(DATA_W)) u_memory (
    .clk, .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  // Registers.
  data_reg #(.W(DATA_W)) u_pc (.clk, .rst_n, .en(tick), .we(ctrl.pc_w), .d(pc_d),      .q(pc));
  data_reg #(.W(DATA_W)) u_ac (.clk, .rst_n, .en(tick), .we(ctrl.ac_w), .d(ac_d),      .q(ac));
  data_reg #(.W(DATA_W)) u_ir (.clk, .rst_n, .en(tick), .we(ctrl.ir_w), .d(mem_rdata), .q(ir));

  flag_ff u_flip (
    .clk, .rst_n, .en(tick && ctrl.ac_in && ctrl.ac_w && ctrl.m_add), .d(alu_z), .q(flip)
  );

  // Memory-mapped output and halt.
  vn_mmio u_mmio (
    .mem_w(ctrl.mem_w), .addr(mem_addr_bus[MEM_AW-1:0]), .out_strobe, .halt_strobe
  );

  assign out_valid = tick && out_strobe;
  assign out_char  = ac;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   halted <= 1'b0;
    else if (tick && halt_strobe) halted <= 1'b1;
  end

endmodule
