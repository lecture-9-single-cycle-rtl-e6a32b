// alu: 32-bit arithmetic/logic unit of the MIPS-lite datapath.
//
// Performs ADD, SUB or OR of busA and the second operand as selected by
// ALUctr, and raises Zero when the result is all zeros; beq uses SUB and
// Zero as its "equal" test. Purely combinational. The operations and the
// ALUctr code (0 ADD, 1 SUB, 2 OR) follow the controller specification;
// the unused code 3 giving zero is this design's choice. Overflow is not
// detected, since the instruction set has no overflow trap.
module alu
  import mips_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  alu_ctr_e    alu_ctr,
  output logic [31:0] result,
  output logic        zero
);
  always_comb begin
    unique case (alu_ctr)
      ALU_ADD: result = a + b;
      ALU_SUB: result = a - b;
      ALU_OR:  result = a | b;
      default: result = '0;
    endcase
    zero = (result == '0);
  end
endmodule
