// tb_hv_random: random-program test of harvard_computer against an
// instruction-level model written in the testbench.
//
// Each round fills program and data memory with random bytes (HALT made
// rare so rounds run longer), resets the machine and runs it. After every
// clock edge the model executes one instruction and the testbench compares
// PC, RI, RO and the zero latch, and checks each terminal character. The
// model's jump rule is the machine's: a taken JZ continues at Imm + 1. A
// round ends at HALT (the clock must then stop) or after 400 instructions;
// the data memory is compared at the end.
module tb_hv_random;
  import hv_pkg::*;
  logic clk = 0, rst_n, run, step_btn;
  logic pmem_load_we, dmem_load_we;
  logic [7:0] pmem_load_addr, pmem_load_data, dmem_load_addr, dmem_load_data;
  logic out_valid, tick, zl;
  logic [7:0] out_char, pc, ri, ro;
  hv_opcode_e opcode;
  hv_ctrl_t dc;

  int checks = 0, failures = 0, n_instr = 0, n_halts = 0, n_taken = 0, n_outs = 0;
  logic [7:0] p_mem [256];
  logic [7:0] d_mem [256];
  logic [7:0] m_pc, m_ri, m_ro;
  logic m_zl, m_out, m_halt;
  logic [7:0] m_out_char;

  harvard_computer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_step();
    logic [7:0] ins, imm, r;
    ins = p_mem[m_pc];
    imm = {3'b000, ins[4:0]};
    m_out = 1'b0;
    case (ins[7:5])
      3'd0: m_ri = d_mem[imm];
      3'd1: m_ro = m_ri + d_mem[imm];
      3'd2: m_ro = m_ri + imm;
      3'd3: begin r = m_ri - d_mem[imm]; m_ro = r; m_zl = (r == 8'd0); end
      3'd4: d_mem[imm] = m_ro;
      3'd5: begin m_out = 1'b1; m_out_char = d_mem[imm]; end
      default: ;
    endcase
    if (ins[7:5] == 3'd6 && m_zl) begin m_pc = imm + 8'd1; n_taken++; end
    else                                 m_pc = m_pc + 8'd1;
  endtask

  initial begin
    logic was_tick, outv;
    logic [7:0] outc;
    bit mem_ok;
    rst_n = 0; run = 0; step_btn = 0;
    pmem_load_we = 0; pmem_load_addr = 0; pmem_load_data = 0;
    dmem_load_we = 0; dmem_load_addr = 0; dmem_load_data = 0;
    for (int round = 0; round < 30; round++) begin
      @(negedge clk); rst_n = 0; run = 0;
      @(negedge clk); rst_n = 1;
      for (int a = 0; a < 256; a++) begin
        p_mem[a] = 8'($urandom);
        if (p_mem[a][7:5] == 3'd7 && ($urandom % 16) != 0) p_mem[a][7:5] = 3'd5;
        d_mem[a] = 8'($urandom % 4);   // small values make SUB hit zero often
        @(negedge clk);
        pmem_load_we = 1; pmem_load_addr = 8'(a); pmem_load_data = p_mem[a];
        dmem_load_we = 1; dmem_load_addr = 8'(a); dmem_load_data = d_mem[a];
      end
      @(negedge clk); pmem_load_we = 0; dmem_load_we = 0;
      m_pc = 0; m_ri = 0; m_ro = 0; m_zl = 0; m_halt = 0;
      @(negedge clk); run = 1; #1;
      for (int k = 0; k < 400 && !m_halt; ) begin
        was_tick = tick; outv = out_valid; outc = out_char;
        if (!was_tick) begin
          checks++;
          if (p_mem[m_pc][7:5] != 3'd7) begin failures++; $display("clock stopped away from HALT"); end
          m_halt = 1;
          n_halts++;
        end
        @(posedge clk); #1;
        if (was_tick) begin
          k++; n_instr++;
          model_step();
          checks++;
          if (pc !== m_pc || ri !== m_ri || ro !== m_ro || zl !== m_zl) begin
            failures++;
            $display("round %0d instr %0d: pc=%h/%h ri=%h/%h ro=%h/%h zl=%b/%b",
                     round, k, pc, m_pc, ri, m_ri, ro, m_ro, zl, m_zl);
          end
          checks++;
          if (outv !== m_out || (m_out && outc !== m_out_char)) begin
            failures++; $display("round %0d instr %0d: output mismatch", round, k);
          end
          if (m_out) n_outs++;
        end
        @(negedge clk); #1;
      end
      mem_ok = 1;
      for (int a = 0; a < 256; a++) if (dut.u_data_mem.mem[a] !== d_mem[a]) mem_ok = 0;
      checks++;
      if (!mem_ok) begin failures++; $display("round %0d: data memory differs", round); end
    end
    checks++;
    if (n_halts == 0 || n_taken == 0 || n_outs == 0) begin
      failures++; $display("coverage: halts=%0d taken=%0d outputs=%0d", n_halts, n_taken, n_outs);
    end
    $display("instructions=%0d halts=%0d taken_jumps=%0d outputs=%0d", n_instr, n_halts, n_taken, n_outs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
