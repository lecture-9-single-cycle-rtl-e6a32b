// alu_tb: checks ADD, SUB and OR and the Zero flag of alu against
// independently computed results, on corner values and random operands.
module alu_tb;
  import mips_pkg::*;
  logic [31:0] a, b, result;
  alu_ctr_e    alu_ctr;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .alu_ctr, .result, .zero);

  task automatic check(input logic [31:0] x, y, input alu_ctr_e op);
    logic [31:0] exp;
    a = x; b = y; alu_ctr = op;
    #1;
    case (op)
      ALU_ADD: exp = x + y;
      ALU_SUB: exp = x + ~y + 32'd1;
      default: exp = x | y;
    endcase
    checks++;
    if (result !== exp || zero !== (exp == 32'd0)) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h got %h z=%b exp %h", op, x, y, result, zero, exp);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    check(32'd5, 32'd5, ALU_SUB);         // equal operands: Zero
    check(32'd5, 32'd6, ALU_SUB);
    check(32'hffff_ffff, 32'd1, ALU_ADD); // wraps to zero
    check(32'h0000_00f0, 32'h0000_0f0f, ALU_OR);
    check(32'd0, 32'd0, ALU_OR);
    for (int i = 0; i < 300; i++) begin
      check($urandom, $urandom, ALU_ADD);
      check($urandom, $urandom, ALU_SUB);
      check($urandom, $urandom, ALU_OR);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
