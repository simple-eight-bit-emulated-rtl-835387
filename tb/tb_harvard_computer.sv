// tb_harvard_computer: runs a looped "HELLO WORLD!" program on
// harvard_computer that prints the line eight times.
//
// Data memory: 0..12 the text, 16 loop count (0), 17 the repeat count 8,
// 18 the constant 0. Program (a taken JZ resumes at target + 1):
//   0 LOAD 18      1..13 OUTM 0..12      14 LOAD 16   15 ADDI 1
//  16 STORE 16    17 LOAD 16   18 SUB 17   19 JZ 22 (exit to 23)
//  20 LOAD 18     21 SUB 18 (sets the zero latch)   22 JZ 0 (to 1)
//  23 ADD 17      24 STORE 20  25 HALT
// The first two instructions are single-stepped, then the machine runs.
// Checks: the text printed eight times, one clock edge per instruction
// (1 + 22 x 7 + 19 + 2 = 176 edges up to the HALT), the machine stopping at
// HALT with PC = 25, RO = 16 and data memory words 16 and 20, and nonzero counts of every
// instruction kind, taken and not-taken jumps.
module tb_harvard_computer;
  import hv_pkg::*;
  logic clk = 0, rst_n, run, step_btn;
  logic pmem_load_we, dmem_load_we;
  logic [7:0] pmem_load_addr, pmem_load_data, dmem_load_addr, dmem_load_data;
  logic out_valid, tick, zl;
  logic [7:0] out_char, pc, ri, ro;
  hv_opcode_e opcode;
  hv_ctrl_t dc;
  int checks = 0, failures = 0, nticks = 0;
  int n_op [8];
  int n_taken = 0, n_not_taken = 0;
  string msg = "HELLO WORLD!\n";
  string got = "", want = "";
  logic [7:0] prog [26];

  harvard_computer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n && tick) begin
    nticks++;
    n_op[opcode]++;
    if (out_valid) got = {got, string'(out_char)};
    if (opcode == HOP_JZ) begin
      if (zl) n_taken++; else n_not_taken++;
    end
  end

  initial begin
    foreach (n_op[i]) n_op[i] = 0;
    prog[0] = 8'h12;
    for (int i = 0; i < 13; i++) prog[1 + i] = 8'hA0 | 8'(i);
    prog[14] = 8'h10; prog[15] = 8'h41; prog[16] = 8'h90; prog[17] = 8'h10;
    prog[18] = 8'h71; prog[19] = 8'hD6; prog[20] = 8'h12; prog[21] = 8'h72;
    prog[22] = 8'hC0; prog[23] = 8'h31; prog[24] = 8'h94; prog[25] = 8'hE0;
    want = "";
    repeat (8) want = {want, msg};

    rst_n = 0; run = 0; step_btn = 0;
    pmem_load_we = 0; pmem_load_addr = 0; pmem_load_data = 0;
    dmem_load_we = 0; dmem_load_addr = 0; dmem_load_data = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      pmem_load_we = 1; pmem_load_addr = 8'(i); pmem_load_data = (i < 26) ? prog[i] : 8'hE0;
      dmem_load_we = 1; dmem_load_addr = 8'(i);
      dmem_load_data = (i < 13) ? msg[i] : (i == 17) ? 8'd8 : 8'd0;
    end
    @(negedge clk); pmem_load_we = 0; dmem_load_we = 0;

    repeat (2) begin
      @(negedge clk); step_btn = 1;
      @(negedge clk); step_btn = 0;
      @(negedge clk);
    end
    check(nticks == 2 && pc == 8'd2 && got == "H",
          $sformatf("single steps: ticks=%0d pc=%0d out=\"%s\"", nticks, pc, got));

    @(negedge clk); run = 1;
    wait (opcode == HOP_HALT);
    repeat (30) @(negedge clk);
    check(nticks == 176, $sformatf("%0d clock edges to HALT, expected 176", nticks));
    check(pc == 8'd25 && opcode == HOP_HALT, $sformatf("stopped at pc=%0d", pc));
    check(got == want, $sformatf("printed \"%s\"", got));
    check(ro == 8'd16, $sformatf("RO=%0d", ro));
    check(dut.u_data_mem.mem[16] == 8'd8 && dut.u_data_mem.mem[20] == 8'd16, "stored words");
    check(n_taken == 8 && n_not_taken == 7, $sformatf("jumps taken %0d not taken %0d", n_taken, n_not_taken));
    for (int i = 0; i < 7; i++) check(n_op[i] > 0, $sformatf("opcode %0d never ran", i));
    $display("ticks=%0d load=%0d add=%0d addi=%0d sub=%0d store=%0d outm=%0d jz=%0d",
             nticks, n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
