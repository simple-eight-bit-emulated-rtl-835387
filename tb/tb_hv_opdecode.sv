// tb_hv_opdecode: exhaustive test of hv_opdecode over {zero latch, opcode}.
// Expected DC7..DC0 bytes are listed here; OutM is DC6|DC4|DC3 = 0x58.
module tb_hv_opdecode;
  import hv_pkg::*;
  logic zl;
  hv_opcode_e oc;
  hv_ctrl_t dc;
  int checks = 0, failures = 0;

  hv_opdecode dut (.*);

  function automatic logic [7:0] expected(input int op, input int z);
    case (op)
      0: return 8'h1A;                 // LOAD
      1: return 8'h1C;                 // ADD
      2: return 8'h0C;                 // ADDI
      3: return 8'h1D;                 // SUB
      4: return 8'h38;                 // STORE
      5: return 8'h58;                 // OUTM
      6: return z ? 8'h10 : 8'h18;     // JZ
      default: return 8'h98;           // HALT
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int z = 0; z < 2; z++)
      for (int op = 0; op < 8; op++) begin
        zl = 1'(z); oc = hv_opcode_e'(op); #1;
        checks++;
        if (dc !== expected(op, z)) begin
          failures++; $display("zl=%0d op=%0d dc=%h exp %h", z, op, dc, expected(op, z));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
