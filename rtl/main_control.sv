// main_control: the processor's controller, from op and func to control points.
//
// Two levels, as in the controller specification: an "AND" plane that
// recognises each instruction (rtype, ori, lw, sw, beq, jump from the six
// opcode bits; add and sub from rtype and the six function bits), and an
// "OR" plane that forms each control signal as the sum of the instructions
// that assert it:
//   RegDst = add+sub          ALUSrc  = ori+lw+sw     MemtoReg = lw
//   RegWrite = add+sub+ori+lw MemWrite = sw           nPCsel  = beq
//   Jump = jump               ExtOp   = lw+sw
//   ALUctr[0] = sub+beq       ALUctr[1] = ori
// Every don't-care of the specification is resolved to 0 by these sums; an
// opcode outside the subset asserts nothing and so acts as a no-op.
// Purely combinational.
module main_control
  import mips_pkg::*;
(
  input  logic [5:0] op,
  input  logic [5:0] func,
  output ctrl_t      ctrl
);
  logic rtype, i_add, i_sub, i_ori, i_lw, i_sw, i_beq, i_jump;

  // "AND" logic
  always_comb begin
    rtype  = (op == OP_RTYPE);
    i_ori  = (op == OP_ORI);
    i_lw   = (op == OP_LW);
    i_sw   = (op == OP_SW);
    i_beq  = (op == OP_BEQ);
    i_jump = (op == OP_J);
    i_add  = rtype && (func == FN_ADD);
    i_sub  = rtype && (func == FN_SUB);
  end

  // "OR" logic
  always_comb begin
    ctrl.reg_dst    = i_add | i_sub;
    ctrl.alu_src    = i_ori | i_lw | i_sw;
    ctrl.mem_to_reg = i_lw;
    ctrl.reg_write  = i_add | i_sub | i_ori | i_lw;
    ctrl.mem_write  = i_sw;
    ctrl.npc_sel    = i_beq;
    ctrl.jump       = i_jump;
    ctrl.ext_op     = i_lw | i_sw;
    ctrl.alu_ctr    = alu_ctr_e'({i_ori, i_sub | i_beq});
  end
endmodule
