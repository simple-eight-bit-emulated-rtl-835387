// tb_mux2_bus: self-checking test of mux2_bus with random inputs and both
// select values.
module tb_mux2_bus;
  logic sel;
  logic [7:0] in0, in1, y;
  int checks = 0, failures = 0;

  mux2_bus #(.W(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400) begin
      sel = 1'($urandom); in0 = 8'($urandom); in1 = 8'($urandom);
      #1;
      checks++;
      if (y !== (sel ? in1 : in0)) begin
        failures++; $display("sel=%b in0=%h in1=%h y=%h", sel, in0, in1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
