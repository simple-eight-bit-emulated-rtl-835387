// tb_step_counter: self-checking test of step_counter with three steps. The
// count must run 0,1,2,0,... advancing only on enabled edges, so that every
// third enabled edge starts a new instruction.
module tb_step_counter;
  logic clk = 0, rst_n, en;
  logic [1:0] step;
  int exp_step, checks = 0, failures = 0, wraps = 0;

  step_counter #(.STEPS(3), .SW(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 0; exp_step = 0;
    #12 rst_n = 1;
    checks++; if (step !== 0) failures++;
    repeat (600) begin
      @(negedge clk); en = 1'($urandom);
      @(posedge clk); #1;
      if (en) begin
        exp_step = (exp_step + 1) % 3;
        if (exp_step == 0) wraps++;
      end
      checks++; if (step !== 2'(exp_step)) begin failures++; $display("step=%0d exp %0d", step, exp_step); end
    end
    // 30 consecutive enabled edges are exactly 10 instructions of 3 steps.
    @(negedge clk); rst_n = 0; #1 rst_n = 1; en = 1;
    for (int i = 1; i <= 30; i++) begin
      @(posedge clk); #1;
      checks++; if (step !== 2'(i % 3)) begin failures++; $display("run step=%0d at %0d", step, i); end
    end
    checks++; if (wraps == 0) begin failures++; $display("never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
