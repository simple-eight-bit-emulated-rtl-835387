// tb_data_reg: self-checking test of data_reg. Random d/en/we each cycle;
// a reference copy in the testbench follows the "load when en and we" rule
// and is compared with q after every edge. Also checks asynchronous reset.
module tb_data_reg;
  logic clk = 0, rst_n, en, we;
  logic [7:0] d, q, ref_q;
  int checks = 0, failures = 0;

  data_reg #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 0; we = 0; d = 8'hA5; ref_q = 0;
    #12;
    checks++; if (q !== 8'h00) begin failures++; $display("reset: q=%h", q); end
    rst_n = 1;
    repeat (500) begin
      @(negedge clk);
      en = 1'($urandom); we = 1'($urandom); d = 8'($urandom);
      @(posedge clk); #1;
      if (en && we) ref_q = d;
      checks++;
      if (q !== ref_q) begin failures++; $display("q=%h expected %h", q, ref_q); end
    end
    @(negedge clk); rst_n = 0; #1;
    checks++; if (q !== 0) begin failures++; $display("async reset failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
