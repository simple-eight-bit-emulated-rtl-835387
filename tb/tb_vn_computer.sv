// tb_vn_computer: runs a "Hello World" program on vn_computer, printing the
// three greeting lines "Hello World!", "Hello Universe!", "Hello Bill!"
// (40 characters; program, text and terminator fill 54 of the 64 bytes).
//
// The program prints a zero-terminated string with self-modifying code: the
// Load at address 0 is incremented after every character, giving an
// indirect walk through the string. An Add of a zero constant sets the zero
// flag for the terminator test and for the unconditional jump back.
//   0 Load STR   1 Add ZERO   2 Jump END   3 Save 3F   4 Load 0
//   5 Add ONE    6 Save 0     7 Load ZERO  8 Add ZERO  9 Jump 0
//  10 END: Save 3E   11 ZERO = 0   12 ONE = 1   13.. string, 0
// The first instruction is single-stepped (three button presses), then the
// machine runs until the halt. Checks: the printed text, the final Load
// byte at address 0, the halt, that the machine stops, and the cycle count
// 3 x (10 N + 4) for N characters (three steps per instruction). Counts of
// taken and not-taken jumps, outputs, self-modifying saves and halts must be
// nonzero.
module tb_vn_computer;
  import vn_pkg::*;
  logic clk = 0, rst_n, run, step_btn, load_we;
  logic [5:0] load_addr;
  logic [7:0] load_data;
  logic out_valid, halted, tick, flip;
  logic [7:0] out_char, pc, ac, ir;
  logic [1:0] step;
  vn_ctrl_t ctrl;
  int checks = 0, failures = 0;
  int nticks = 0, n_taken = 0, n_not_taken = 0, n_out = 0, n_selfmod = 0, n_halt = 0;
  string msg = "Hello World!\nHello Universe!\nHello Bill!";
  string got = "";
  logic [7:0] prog [64];

  vn_computer dut (.*);

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

  // Monitor: count what happens on each emulated clock edge.
  always @(posedge clk) if (rst_n && tick) begin
    nticks++;
    if (out_valid) begin n_out++; got = {got, string'(out_char)}; end
    if (step == 2'd2 && ir[7:6] == 2'b11) begin
      if (flip) n_taken++; else n_not_taken++;
    end
    if (ctrl.mem_w && ir[5:0] < 6'd13) n_selfmod++;
    if (ctrl.mem_w && ir[5:0] == HALT_ADDR) n_halt++;
  end

  initial begin
    int n;
    n = msg.len();
    foreach (prog[i]) prog[i] = 8'h00;
    prog[0] = 8'h4D; prog[1] = 8'h0B; prog[2] = 8'hCA; prog[3] = 8'hBF;
    prog[4] = 8'h40; prog[5] = 8'h0C; prog[6] = 8'h80; prog[7] = 8'h4B;
    prog[8] = 8'h0B; prog[9] = 8'hC0; prog[10] = 8'hBE; prog[11] = 8'h00;
    prog[12] = 8'h01;
    for (int i = 0; i < n; i++) prog[13 + i] = msg[i];

    rst_n = 0; run = 0; step_btn = 0; load_we = 0; load_addr = 0; load_data = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); load_we = 1; load_addr = 6'(i); load_data = prog[i];
    end
    @(negedge clk); load_we = 0;

    // Single-step the first instruction: three presses.
    repeat (3) begin
      @(negedge clk); step_btn = 1;
      @(negedge clk); step_btn = 0;
      @(negedge clk);
    end
    check(nticks == 3, "three presses give three clock edges");
    check(pc == 8'd1 && ir == 8'h4D && ac == 8'h48 && step == 2'd0,
          $sformatf("after first instruction pc=%0d ir=%h ac=%h step=%0d", pc, ir, ac, step));

    @(negedge clk); run = 1;
    wait (halted);
    @(negedge clk); run = 1;
    begin
      int ticks_at_halt;
      ticks_at_halt = nticks;
      repeat (30) @(negedge clk);
      check(nticks == ticks_at_halt, "no clock edges after the halt");
    end

    check(got == msg, $sformatf("printed \"%s\"", got));
    check(nticks == 3 * (10 * n + 4), $sformatf("%0d clock edges, expected %0d", nticks, 3 * (10 * n + 4)));
    check(dut.u_memory.mem[0] == 8'(8'h40 + 13 + n), "self-modified Load at address 0");
    check(n_taken == n + 1, $sformatf("%0d taken jumps", n_taken));
    check(n_not_taken == n, $sformatf("%0d not-taken jumps", n_not_taken));
    check(n_out == n, "outputs");
    check(n_selfmod == n, "self-modifying saves");
    check(n_halt == 1, "halt");
    $display("ticks=%0d taken=%0d not_taken=%0d out=%0d selfmod=%0d halt=%0d",
             nticks, n_taken, n_not_taken, n_out, n_selfmod, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
