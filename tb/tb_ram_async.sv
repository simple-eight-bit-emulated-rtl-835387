// tb_ram_async: self-checking test of ram_async (64 x 8, the von Neumann
// memory size). Fills every word, then mixes random writes and reads against
// a reference array; reads are checked combinationally, before the edge,
// and a write must be visible right after its edge.
module tb_ram_async;
  logic clk = 0, we;
  logic [5:0] addr;
  logic [7:0] wdata, rdata;
  logic [7:0] model [64];
  int checks = 0, failures = 0;

  ram_async #(.AW(6), .DW(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; addr = 6'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 64; i++) begin
      addr = 6'(i); #1;
      checks++; if (rdata !== model[i]) begin failures++; $display("rd %0d: %h vs %h", i, rdata, model[i]); end
    end
    repeat (1000) begin
      @(negedge clk);
      we = 1'($urandom); addr = 6'($urandom); wdata = 8'($urandom);
      #1;
      checks++; if (rdata !== model[addr]) begin failures++; $display("pre-edge rd %0d", addr); end
      @(posedge clk); #1;
      if (we) model[addr] = wdata;
      checks++; if (rdata !== model[addr]) begin failures++; $display("post-edge rd %0d", addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
