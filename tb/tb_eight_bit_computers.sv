// tb_eight_bit_computers: end-to-end test of the top with its default
// parameters, both computers loaded and running at the same time.
//
// von Neumann machine: the self-modifying "Hello World!" program (see
// tb_vn_computer), first instruction single-stepped. Harvard machine: the
// looped "HELLO WORLD!" program (see tb_harvard_computer), first two
// instructions single-stepped. Checks the two terminal streams, the halts,
// the cycle counts (3 per von Neumann instruction, 1 per Harvard
// instruction) and that each mechanism happened at least once: single step,
// run, memory-mapped output, memory-mapped halt, self-modifying save, jump
// taken and not taken, zero-flag update, the von Neumann fetch/increment/
// execute steps, Harvard OutM, immediate operand, subtract with zero latch,
// store, and the clock disable at HALT.
module tb_eight_bit_computers;
  import vn_pkg::*;
  import hv_pkg::*;
  logic clk = 0, rst_n;
  logic vn_run, vn_step_btn, vn_load_we, vn_out_valid, vn_halted, vn_tick, vn_flip;
  logic [5:0] vn_load_addr;
  logic [7:0] vn_load_data, vn_out_char, vn_pc, vn_ac, vn_ir;
  logic [1:0] vn_step;
  vn_ctrl_t vn_ctrl;
  logic hv_run, hv_step_btn, hv_pmem_load_we, hv_dmem_load_we, hv_out_valid, hv_tick, hv_zl;
  logic [7:0] hv_pmem_load_addr, hv_pmem_load_data, hv_dmem_load_addr, hv_dmem_load_data;
  logic [7:0] hv_out_char, hv_pc, hv_ri, hv_ro;
  hv_opcode_e hv_opcode;
  hv_ctrl_t hv_dc;

  int checks = 0, failures = 0;
  string vn_msg = "Hello World!\n", hv_msg = "HELLO WORLD!\n";
  string vn_got = "", hv_got = "";
  logic [7:0] vn_prog [64];
  logic [7:0] hv_prog [26];

  // Mechanism counters.
  int vn_ticks = 0, vn_fetch = 0, vn_inc = 0, vn_exec = 0, vn_taken = 0, vn_not_taken = 0;
  int vn_out = 0, vn_selfmod = 0, vn_halt = 0, vn_flag_set = 0, vn_steps_single = 0;
  int hv_ticks = 0, hv_taken = 0, hv_not_taken = 0, hv_out = 0, hv_imm = 0, hv_sub = 0;
  int hv_store = 0, hv_disable = 0, hv_steps_single = 0;

  eight_bit_computers dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (vn_tick) begin
      vn_ticks++;
      if (!vn_run) vn_steps_single++;
      case (vn_step)
        2'd0: vn_fetch++;
        2'd1: vn_inc++;
        default: vn_exec++;
      endcase
      if (vn_out_valid) begin vn_out++; vn_got = {vn_got, string'(vn_out_char)}; end
      if (vn_step == 2'd2 && vn_ir[7:6] == 2'b11) begin
        if (vn_flip) vn_taken++; else vn_not_taken++;
      end
      if (vn_step == 2'd2 && vn_ir[7:6] == 2'b00 && vn_ac + dut.u_vn.mem_rdata == 8'd0) vn_flag_set++;
      if (vn_ctrl.mem_w && vn_ir[5:0] < 6'd13) vn_selfmod++;
      if (vn_ctrl.mem_w && vn_ir[5:0] == HALT_ADDR) vn_halt++;
    end
    if (hv_tick) begin
      hv_ticks++;
      if (!hv_run) hv_steps_single++;
      if (hv_out_valid) begin hv_out++; hv_got = {hv_got, string'(hv_out_char)}; end
      if (hv_opcode == HOP_JZ) begin
        if (hv_zl) hv_taken++; else hv_not_taken++;
      end
      if (hv_opcode == HOP_ADDI) hv_imm++;
      if (hv_opcode == HOP_SUB) hv_sub++;
      if (hv_opcode == HOP_STORE) hv_store++;
    end
    if (hv_run && hv_dc.clk_disable && !hv_tick) hv_disable++;
  end

  task automatic press(input logic is_vn);
    @(negedge clk); if (is_vn) vn_step_btn = 1; else hv_step_btn = 1;
    @(negedge clk); vn_step_btn = 0; hv_step_btn = 0;
    @(negedge clk);
  endtask

  initial begin
    int n;
    n = vn_msg.len();
    foreach (vn_prog[i]) vn_prog[i] = 8'h00;
    vn_prog[0] = 8'h4D; vn_prog[1] = 8'h0B; vn_prog[2] = 8'hCA; vn_prog[3] = 8'hBF;
    vn_prog[4] = 8'h40; vn_prog[5] = 8'h0C; vn_prog[6] = 8'h80; vn_prog[7] = 8'h4B;
    vn_prog[8] = 8'h0B; vn_prog[9] = 8'hC0; vn_prog[10] = 8'hBE; vn_prog[12] = 8'h01;
    for (int i = 0; i < n; i++) vn_prog[13 + i] = vn_msg[i];
    hv_prog[0] = 8'h12;
    for (int i = 0; i < 13; i++) hv_prog[1 + i] = 8'hA0 | 8'(i);
    hv_prog[14] = 8'h10; hv_prog[15] = 8'h41; hv_prog[16] = 8'h90; hv_prog[17] = 8'h10;
    hv_prog[18] = 8'h71; hv_prog[19] = 8'hD6; hv_prog[20] = 8'h12; hv_prog[21] = 8'h72;
    hv_prog[22] = 8'hC0; hv_prog[23] = 8'h31; hv_prog[24] = 8'h94; hv_prog[25] = 8'hE0;

    rst_n = 0;
    vn_run = 0; vn_step_btn = 0; vn_load_we = 0; vn_load_addr = 0; vn_load_data = 0;
    hv_run = 0; hv_step_btn = 0;
    hv_pmem_load_we = 0; hv_pmem_load_addr = 0; hv_pmem_load_data = 0;
    hv_dmem_load_we = 0; hv_dmem_load_addr = 0; hv_dmem_load_data = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      vn_load_we = (i < 64); vn_load_addr = 6'(i); vn_load_data = vn_prog[i % 64];
      hv_pmem_load_we = 1; hv_pmem_load_addr = 8'(i);
      hv_pmem_load_data = (i < 26) ? hv_prog[i] : 8'hE0;
      hv_dmem_load_we = 1; hv_dmem_load_addr = 8'(i);
      hv_dmem_load_data = (i < 13) ? hv_msg[i] : (i == 17) ? 8'd3 : 8'd0;
    end
    @(negedge clk); vn_load_we = 0; hv_pmem_load_we = 0; hv_dmem_load_we = 0;

    repeat (3) press(1'b1);
    repeat (2) press(1'b0);
    check(vn_pc == 8'd1 && vn_ac == 8'h48, "von Neumann single-stepped first instruction");
    check(hv_pc == 8'd2, "Harvard single-stepped two instructions");

    @(negedge clk); vn_run = 1; hv_run = 1;
    fork
      wait (vn_halted);
      wait (hv_opcode == HOP_HALT);
    join
    repeat (30) @(negedge clk);

    check(vn_got == vn_msg, $sformatf("von Neumann printed \"%s\"", vn_got));
    check(hv_got == {hv_msg, hv_msg, hv_msg}, $sformatf("Harvard printed \"%s\"", hv_got));
    check(vn_ticks == 3 * (10 * n + 4), $sformatf("von Neumann %0d clock edges", vn_ticks));
    check(vn_fetch == vn_inc && vn_inc == vn_exec, "three steps per von Neumann instruction");
    check(hv_ticks == 66, $sformatf("Harvard %0d clock edges", hv_ticks));
    check(hv_pc == 8'd25 && hv_ro == 8'd6, "Harvard final state");
    check(dut.u_vn.u_memory.mem[0] == 8'(8'h40 + 13 + n), "self-modified Load");

    check(vn_steps_single == 3,  "mechanism: von Neumann single step");
    check(vn_fetch > 0,          "mechanism: von Neumann fetch step");
    check(vn_inc > 0,            "mechanism: von Neumann PC increment step");
    check(vn_taken > 0,          "mechanism: von Neumann jump taken");
    check(vn_not_taken > 0,      "mechanism: von Neumann jump not taken");
    check(vn_flag_set > 0,       "mechanism: von Neumann zero flag set by Add");
    check(vn_out > 0,            "mechanism: memory-mapped output (save to 3F)");
    check(vn_selfmod > 0,        "mechanism: self-modifying save");
    check(vn_halt == 1,          "mechanism: memory-mapped halt (save to 3E)");
    check(hv_steps_single == 2,  "mechanism: Harvard clock pulse");
    check(hv_out > 0,            "mechanism: Harvard OutM");
    check(hv_imm > 0,            "mechanism: Harvard immediate operand");
    check(hv_sub > 0,            "mechanism: Harvard subtract / zero latch");
    check(hv_store > 0,          "mechanism: Harvard store");
    check(hv_taken > 0,          "mechanism: Harvard jump taken");
    check(hv_not_taken > 0,      "mechanism: Harvard jump not taken");
    check(hv_disable > 0,        "mechanism: Harvard clock disable");
    $display("vn: ticks=%0d taken=%0d not_taken=%0d flag_set=%0d out=%0d selfmod=%0d halt=%0d single=%0d",
             vn_ticks, vn_taken, vn_not_taken, vn_flag_set, vn_out, vn_selfmod, vn_halt, vn_steps_single);
    $display("hv: ticks=%0d taken=%0d not_taken=%0d out=%0d imm=%0d sub=%0d store=%0d disable=%0d single=%0d",
             hv_ticks, hv_taken, hv_not_taken, hv_out, hv_imm, hv_sub, hv_store, hv_disable, hv_steps_single);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
