// tb_hv_hello_series: the straight-line "Hello World" of the Harvard
// machine. The program memory cannot be changed by the running program and
// there is no indirect addressing, so the text is printed by a series of
// OutM instructions, one per character: eight lines of "HELLO WORLD!" are
// 8 x 13 = 104 OutM words followed by HALT (105 of the 256 program words;
// the 13 characters sit in data memory words 0..12). Checks the printed
// text, one clock edge per instruction (104 edges, then the clock stops),
// and the final PC.
module tb_hv_hello_series;
  import hv_pkg::*;
  logic clk = 0, rst_n, run, step_btn;
  logic pmem_load_we, dmem_load_we;
  logic [7:0] pmem_load_addr, pmem_load_data, dmem_load_addr, dmem_load_data;
  logic out_valid, tick, zl;
  logic [7:0] out_char, pc, ri, ro;
  hv_opcode_e opcode;
  hv_ctrl_t dc;
  int checks = 0, failures = 0, nticks = 0;
  string msg = "HELLO WORLD!\n";
  string got = "", want = "";

  harvard_computer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && tick) begin
    nticks++;
    if (out_valid) got = {got, string'(out_char)};
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (8) want = {want, msg};
    rst_n = 0; run = 0; step_btn = 0;
    pmem_load_we = 0; pmem_load_addr = 0; pmem_load_data = 0;
    dmem_load_we = 0; dmem_load_addr = 0; dmem_load_data = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      pmem_load_we = 1; pmem_load_addr = 8'(i);
      pmem_load_data = (i < 104) ? (8'hA0 | 8'(i % 13)) : 8'hE0;
      dmem_load_we = 1; dmem_load_addr = 8'(i);
      dmem_load_data = (i < 13) ? msg[i] : 8'd0;
    end
    @(negedge clk); pmem_load_we = 0; dmem_load_we = 0;
    @(negedge clk); run = 1;
    wait (opcode == HOP_HALT);
    repeat (20) @(negedge clk);
    check(got == want, $sformatf("printed \"%s\"", got));
    check(nticks == 104, $sformatf("%0d clock edges, expected 104", nticks));
    check(pc == 8'd104, $sformatf("stopped at pc=%0d", pc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
