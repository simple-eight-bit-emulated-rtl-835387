// tb_clock_ctrl: self-checking test of clock_ctrl: run gives a tick every
// cycle, disable_run stops it, and each press of the step button gives one
// tick however long it is held, also while disabled.
module tb_clock_ctrl;
  logic clk = 0, rst_n, run, disable_run, step_btn, tick;
  int checks = 0, failures = 0, nticks;

  clock_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic count_ticks(input int cycles, output int n);
    n = 0;
    repeat (cycles) begin
      @(posedge clk);
      if (tick) n++;
    end
  endtask

  task automatic expect_n(input int got, input int want, input string what);
    checks++;
    if (got != want) begin failures++; $display("%s: %0d ticks, expected %0d", what, got, want); end
  endtask

  initial begin
    rst_n = 0; run = 0; disable_run = 0; step_btn = 0;
    #12 rst_n = 1;
    @(negedge clk);
    count_ticks(20, nticks); expect_n(nticks, 0, "idle");
    @(negedge clk); run = 1;
    count_ticks(20, nticks); expect_n(nticks, 20, "run");
    @(negedge clk); disable_run = 1;
    count_ticks(20, nticks); expect_n(nticks, 0, "disabled");
    for (int p = 1; p <= 4; p++) begin
      @(negedge clk); step_btn = 1;
      fork
        count_ticks(3 * p, nticks);
        begin repeat (p) @(negedge clk); step_btn = 0; end
      join
      expect_n(nticks, 1, "one press while disabled");
    end
    @(negedge clk); run = 0; disable_run = 0; step_btn = 1;
    count_ticks(5, nticks); expect_n(nticks, 1, "held press");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
