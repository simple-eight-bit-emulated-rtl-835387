// tb_vn_random: random-program test of vn_computer against an
// instruction-level model written in the testbench.
//
// Each round fills the 64-byte memory with random bytes, resets the machine
// and runs it. After the last step of every instruction the model executes
// the same instruction (fetch M[PC], PC + 1, then Add / Load / Save / Jump)
// and the testbench compares PC, AC, IR, the zero flag and the memory, and
// checks every terminal character and the halt against the model. A round
// ends at a halt or after 300 instructions. The step count must be back at 0
// after every instruction, so each instruction takes three clock edges.
module tb_vn_random;
  import vn_pkg::*;
  logic clk = 0, rst_n, run, step_btn, load_we;
  logic [5:0] load_addr;
  logic [7:0] load_data;
  logic out_valid, halted, tick, flip;
  logic [7:0] out_char, pc, ac, ir;
  logic [1:0] step;
  vn_ctrl_t ctrl;

  int checks = 0, failures = 0, n_instr = 0, n_halts = 0, n_outs = 0, n_jumps = 0;
  logic [7:0] m_mem [64];
  logic [7:0] m_pc, m_ac, m_ir;
  logic m_flip, m_halt, m_out;
  logic [7:0] m_out_char;

  vn_computer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic model_step();
    logic [5:0] i;
    logic [7:0] sum;
    m_ir = m_mem[m_pc[5:0]];
    m_pc = m_pc + 8'd1;
    i = m_ir[5:0];
    m_out = 1'b0;
    case (m_ir[7:6])
      2'b00: begin sum = m_ac + m_mem[i]; m_ac = sum; m_flip = (sum == 8'd0); end
      2'b01: m_ac = m_mem[i];
      2'b10: begin
        m_mem[i] = m_ac;
        if (i == 6'h3F) begin m_out = 1'b1; m_out_char = m_ac; end
        if (i == 6'h3E) m_halt = 1'b1;
      end
      default: if (m_flip) begin m_pc = {2'b00, i}; n_jumps++; end
    endcase
  endtask

  initial begin
    logic fin, outv;
    logic [7:0] outc;
    bit mem_ok;
    rst_n = 0; run = 0; step_btn = 0; load_we = 0; load_addr = 0; load_data = 0;
    for (int round = 0; round < 40; round++) begin
      @(negedge clk); rst_n = 0; run = 0;
      @(negedge clk); rst_n = 1;
      for (int a = 0; a < 64; a++) begin
        m_mem[a] = 8'($urandom);
        // Fewer Saves to the halt address, so rounds run longer.
        if (m_mem[a] == 8'hBE && ($urandom % 4) != 0) m_mem[a] = 8'hBF;
        @(negedge clk); load_we = 1; load_addr = 6'(a); load_data = m_mem[a];
      end
      @(negedge clk); load_we = 0;
      m_pc = 0; m_ac = 0; m_ir = 0; m_flip = 0; m_halt = 0;
      run = 1;
      for (int k = 0; k < 300 && !m_halt; ) begin
        @(negedge clk);
        fin  = tick && step == 2'd2;
        outv = out_valid; outc = out_char;
        @(posedge clk); #1;
        if (fin) begin
          k++; n_instr++;
          model_step();
          checks++;
          if (pc !== m_pc || ac !== m_ac || ir !== m_ir || flip !== m_flip || step !== 2'd0 || halted !== m_halt) begin
            failures++;
            $display("round %0d instr %0d: pc=%h/%h ac=%h/%h ir=%h/%h flip=%b/%b step=%0d halt=%b/%b",
                     round, k, pc, m_pc, ac, m_ac, ir, m_ir, flip, m_flip, step, halted, m_halt);
          end
          checks++;
          if (outv !== m_out || (m_out && outc !== m_out_char)) begin
            failures++; $display("round %0d instr %0d: output %b %h, model %b %h", round, k, outv, outc, m_out, m_out_char);
          end
          if (m_out) n_outs++;
        end else begin
          checks++;
          if (outv) begin failures++; $display("output outside an execute step"); end
        end
      end
      if (m_halt) n_halts++;
      mem_ok = 1;
      for (int a = 0; a < 64; a++) if (dut.u_memory.mem[a] !== m_mem[a]) mem_ok = 0;
      checks++;
      if (!mem_ok) begin failures++; $display("round %0d: memory differs", round); end
    end
    checks++;
    if (n_halts == 0 || n_outs == 0 || n_jumps == 0) begin
      failures++; $display("coverage: halts=%0d outputs=%0d jumps=%0d", n_halts, n_outs, n_jumps);
    end
    $display("instructions=%0d halts=%0d outputs=%0d jumps=%0d", n_instr, n_halts, n_outs, n_jumps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
