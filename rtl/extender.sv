// extender: widens the 16-bit immediate of an I-type instruction to 32 bits.
//
// ExtOp = 0 fills the upper half with zeros (used by ori), ExtOp = 1 copies
// bit 15 into the upper half (used by lw and sw). Purely combinational.
// The two modes and their use follow the processor's control specification;
// the block has no internal choices of its own.
module extender (
  input  logic [15:0] imm16,
  input  logic        ext_op,  // 0: zero-extend, 1: sign-extend
  output logic [31:0] imm32
);
  always_comb begin
    imm32 = {{16{ext_op & imm16[15]}}, imm16};
  end
endmodule
