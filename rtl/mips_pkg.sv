// mips_pkg: types and constants shared by the MIPS-lite processors.
//
// The instruction subset is add, sub, ori, lw, sw, beq and j. Opcode and
// function-field values, the set of control signals and the two-bit ALU
// control code (0 = ADD, 1 = SUB, 2 = OR) are those of the controller
// specification this design implements. The struct packing order and the
// pipeline-only types at the end are this design's own choice.
package mips_pkg;

  // Opcodes (instruction bits 31:26)
  localparam logic [5:0] OP_RTYPE = 6'b00_0000;
  localparam logic [5:0] OP_ORI   = 6'b00_1101;
  localparam logic [5:0] OP_LW    = 6'b10_0011;
  localparam logic [5:0] OP_SW    = 6'b10_1011;
  localparam logic [5:0] OP_BEQ   = 6'b00_0100;
  localparam logic [5:0] OP_J     = 6'b00_0010;

  // Function field of R-type instructions (bits 5:0)
  localparam logic [5:0] FN_ADD = 6'b10_0000;
  localparam logic [5:0] FN_SUB = 6'b10_0010;

  // ALU operation, ALUctr
  typedef enum logic [1:0] {
    ALU_ADD = 2'b00,
    ALU_SUB = 2'b01,
    ALU_OR  = 2'b10
  } alu_ctr_e;

  // Control points of the datapath
  typedef struct packed {
    logic     reg_dst;    // 0: write rt, 1: write rd
    logic     alu_src;    // 0: busB, 1: extended immediate
    logic     mem_to_reg; // 0: ALU result, 1: data memory
    logic     reg_write;  // write the register file
    logic     mem_write;  // write the data memory
    logic     npc_sel;    // 0: PC+4, 1: branch when operands are equal
    logic     jump;       // PC <- jump target
    logic     ext_op;     // 0: zero-extend, 1: sign-extend imm16
    alu_ctr_e alu_ctr;
  } ctrl_t;

  // Instruction fields
  function automatic logic [5:0] f_op(input logic [31:0] i);
    return i[31:26];
  endfunction
  function automatic logic [4:0] f_rs(input logic [31:0] i);
    return i[25:21];
  endfunction
  function automatic logic [4:0] f_rt(input logic [31:0] i);
    return i[20:16];
  endfunction
  function automatic logic [4:0] f_rd(input logic [31:0] i);
    return i[15:11];
  endfunction
  function automatic logic [5:0] f_func(input logic [31:0] i);
    return i[5:0];
  endfunction
  function automatic logic [15:0] f_imm16(input logic [31:0] i);
    return i[15:0];
  endfunction
  function automatic logic [25:0] f_target(input logic [31:0] i);
    return i[25:0];
  endfunction

  // Source of an ALU operand in the pipeline's execute stage
  typedef enum logic [1:0] {
    FWD_NONE = 2'b00,  // value read from the register file
    FWD_MEM  = 2'b01,  // ALU result of the instruction one ahead
    FWD_WB   = 2'b10   // write-back value of the instruction two ahead
  } fwd_sel_e;

  // Pipeline events, one pulse per cycle in which each mechanism acts
  typedef struct packed {
    logic load_use_stall;  // interlock: decode waits one cycle for a load
    logic branch_stall;    // decode waits for a branch operand
    logic fwd_ex;          // an execute-stage operand was forwarded
    logic fwd_id;          // a branch comparator operand was forwarded
    logic rf_bypass;       // decode read a register written in the same cycle
    logic branch_taken;    // a taken beq redirected the fetch
    logic jump_taken;      // a j redirected the fetch
  } pipe_events_t;

endpackage
