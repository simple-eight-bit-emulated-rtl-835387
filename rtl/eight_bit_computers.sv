// eight_bit_computers: the two example computers side by side. They share
// no hardware; each keeps its own clock controls, load ports, terminal
// output and diagnostic outputs (vn_* for the three-step von Neumann
// accumulator machine, hv_* for the single-cycle Harvard machine). Both run
// on the one clk and rst_n.
module eight_bit_computers
  import vn_pkg::*;
  import hv_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // von Neumann computer
  input  logic                vn_run,
  input  logic                vn_step_btn,
  input  logic                vn_load_we,
  input  logic [5:0]          vn_load_addr,
  input  logic [7:0]          vn_load_data,
  output logic                vn_out_valid,
  output logic [7:0]          vn_out_char,
  output logic                vn_halted,
  output logic                vn_tick,
  output logic [7:0]          vn_pc,
  output logic [7:0]          vn_ac,
  output logic [7:0]          vn_ir,
  output logic [1:0]          vn_step,
  output logic                vn_flip,
  output vn_ctrl_t            vn_ctrl,
  // Harvard computer
  input  logic                hv_run,
  input  logic                hv_step_btn,
  input  logic                hv_pmem_load_we,
  input  logic [7:0]          hv_pmem_load_addr,
  input  logic [7:0]          hv_pmem_load_data,
  input  logic                hv_dmem_load_we,
  input  logic [7:0]          hv_dmem_load_addr,
  input  logic [7:0]          hv_dmem_load_data,
  output logic                hv_out_valid,
  output logic [7:0]          hv_out_char,
  output logic                hv_tick,
  output logic [7:0]          hv_pc,
  output logic [7:0]          hv_ri,
  output logic [7:0]          hv_ro,
  output logic                hv_zl,
  output hv_opcode_e          hv_opcode,
  output hv_ctrl_t            hv_dc
);

  vn_computer u_vn (
    .clk, .rst_n,
    .run(vn_run), .step_btn(vn_step_btn),
    .load_we(vn_load_we), .load_addr(vn_load_addr), .load_data(vn_load_data),
    .out_valid(vn_out_valid), .out_char(vn_out_char), .halted(vn_halted),
    .tick(vn_tick), .pc(vn_pc), .ac(vn_ac), .ir(vn_ir), .step(vn_step),
    .flip(vn_flip), .ctrl(vn_ctrl)
  );

  harvard_computer u_hv (
    .clk, .rst_n,
    .run(hv_run), .step_btn(hv_step_btn),
    .pmem_load_we(hv_pmem_load_we), .pmem_load_addr(hv_pmem_load_addr),
    .pmem_load_data(hv_pmem_load_data),
    .dmem_load_we(hv_dmem_load_we), .dmem_load_addr(hv_dmem_load_addr),
    .dmem_load_data(hv_dmem_load_data),
    .out_valid(hv_out_valid), .out_char(hv_out_char), .tick(hv_tick),
    .pc(hv_pc), .ri(hv_ri), .ro(hv_ro), .zl(hv_zl), .opcode(hv_opcode), .dc(hv_dc)
  );

endmodule
