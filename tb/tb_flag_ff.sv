// tb_flag_ff: self-checking test of flag_ff: the flag follows d only on
// enabled edges and clears on reset.
module tb_flag_ff;
  logic clk = 0, rst_n, en, d, q, ref_q;
  int checks = 0, failures = 0;

  flag_ff dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 0; d = 1; ref_q = 0;
    #12;
    checks++; if (q !== 0) begin failures++; $display("reset"); end
    rst_n = 1;
    repeat (500) begin
      @(negedge clk); en = 1'($urandom); d = 1'($urandom);
      @(posedge clk); #1;
      if (en) ref_q = d;
      checks++; if (q !== ref_q) begin failures++; $display("q=%b exp %b", q, ref_q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
