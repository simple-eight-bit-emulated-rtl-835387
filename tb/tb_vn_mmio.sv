// tb_vn_mmio: exhaustive test of vn_mmio over every address with and
// without a memory write: output only on a write to 0x3F, halt only on a
// write to 0x3E.
module tb_vn_mmio;
  logic mem_w, out_strobe, halt_strobe;
  logic [5:0] addr;
  int checks = 0, failures = 0;

  vn_mmio dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 2; w++)
      for (int a = 0; a < 64; a++) begin
        mem_w = 1'(w); addr = 6'(a); #1;
        checks++;
        if (out_strobe !== (w == 1 && a == 63) || halt_strobe !== (w == 1 && a == 62)) begin
          failures++; $display("w=%0d a=%h out=%b halt=%b", w, a, out_strobe, halt_strobe);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
