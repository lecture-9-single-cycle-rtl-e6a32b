// extender_tb: checks zero and sign extension of imm16 exhaustively.
module extender_tb;
  logic [15:0] imm16;
  logic        ext_op;
  logic [31:0] imm32, exp;
  int checks = 0, failures = 0;

  extender dut (.imm16, .ext_op, .imm32);

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int v = 0; v < 65536; v++) begin
        imm16 = v[15:0]; ext_op = e[0];
        #1;
        exp = (e == 1 && v >= 32768) ? 32'(v) + 32'hffff_0000 : 32'(v);
        checks++;
        if (imm32 !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL imm=%h ext=%0d got %h exp %h", imm16, e, imm32, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
