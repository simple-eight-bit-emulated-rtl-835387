// tb_alu8: self-checking test of alu8. The reference uses integer
// arithmetic: f = (a +/- b +/- cin) mod 256, carry from the 9-bit sum (for
// subtraction, carry = no borrow), overflow from the signed result leaving
// -128..127, zero and negative from f. Includes the PC + 1 and zero cases.
module tb_alu8;
  logic [7:0] a, b, f;
  logic sub, cin, c, ov, z, n;
  int checks = 0, failures = 0;

  alu8 #(.W(8)) dut (.*);

  task automatic check_one(input logic [7:0] ta, input logic [7:0] tb_, input logic ts, input logic tc);
    int sa, sb, sres, ures;
    logic [7:0] ef; logic ec, eov;
    a = ta; b = tb_; sub = ts; cin = tc;
    #1;
    sa = $signed(ta); sb = $signed(tb_);
    if (!ts) begin
      ures = int'(ta) + int'(tb_) + int'(tc);
      ec   = (ures > 255);
      sres = sa + sb + int'(tc);
    end else begin
      ures = int'(ta) - int'(tb_) - int'(tc);
      ec   = (ures >= 0);
      sres = sa - sb - int'(tc);
    end
    ef  = 8'(ures);
    eov = (sres > 127) || (sres < -128);
    checks++;
    if (f !== ef || c !== ec || ov !== eov || z !== (ef == 0) || n !== ef[7]) begin
      failures++;
      $display("a=%h b=%h sub=%b cin=%b: f=%h c=%b ov=%b z=%b n=%b, expected f=%h c=%b ov=%b",
               ta, tb_, ts, tc, f, c, ov, z, n, ef, ec, eov);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(8'h00, 8'h00, 0, 0);
    check_one(8'hFF, 8'h01, 0, 0);
    check_one(8'h7F, 8'h01, 0, 0);
    check_one(8'h05, 8'h05, 1, 0);
    check_one(8'h03, 8'h05, 1, 0);
    check_one(8'h80, 8'h01, 1, 0);
    repeat (2000) check_one(8'($urandom), 8'($urandom), 1'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
