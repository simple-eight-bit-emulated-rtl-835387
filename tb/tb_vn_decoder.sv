// tb_vn_decoder: exhaustive test of vn_decoder over all 32 inputs
// {opcode, zero flag, step}. The expected control words are written out here
// as bit patterns in the field order AC-in, Mem-W, AC-W, IR-W, PC-W, M Add,
// PC Mux, AC-PC, M PC+.
module tb_vn_decoder;
  import vn_pkg::*;
  vn_opcode_e opcode;
  logic flip;
  logic [1:0] step;
  vn_ctrl_t ctrl;
  int checks = 0, failures = 0;

  vn_decoder dut (.*);

  function automatic logic [8:0] expected(input int op, input int fl, input int st);
    case (st)
      0: return 9'b000100000;               // fetch
      1: return 9'b000011011;               // PC + 1
      2: case (op)
           0: return 9'b101001000;          // Add
           1: return 9'b001001000;          // Load
           2: return 9'b010001000;          // Save
           default: return fl ? 9'b000010100 : 9'b000000000;  // Jump
         endcase
      default: return 9'b0;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int op = 0; op < 4; op++)
      for (int fl = 0; fl < 2; fl++)
        for (int st = 0; st < 4; st++) begin
          opcode = vn_opcode_e'(op); flip = 1'(fl); step = 2'(st); #1;
          checks++;
          if (ctrl !== expected(op, fl, st)) begin
            failures++; $display("op=%0d flip=%0d step=%0d ctrl=%b exp %b", op, fl, st, ctrl, expected(op, fl, st));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
