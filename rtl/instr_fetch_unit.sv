// instr_fetch_unit: program counter and next-address logic.
//
// The PC register holds only bits 31:2 of the instruction address; the two
// low bits are always 00, so the "+4" adder adds 1 to the 30-bit register.
// A second adder adds the sign-extended imm16 ("PC Ext") to PC+4, giving
// PC + 4 + SignExt(imm16)*4. The next-PC mux takes the branch target when
// nPC_sel AND Equal are both 1 (nPC_sel is the "branch instruction" bit,
// Equal the ALU's zero flag), otherwise PC+4. All of this follows the
// fetch unit's description. The jump path, PC <- {PC+4[31:28], target, 00},
// is the standard MIPS j rule; the fetch unit's description does not cover j.
// Reset to address 0 is this design's choice.
//
// Timing: inst_addr is the current PC; the next PC is loaded at the rising
// clock edge, so each instruction takes exactly one cycle.
module instr_fetch_unit (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        npc_sel,  // branch instruction
  input  logic        equal,    // ALU zero: operands equal
  input  logic        jump,
  input  logic [15:0] imm16,
  input  logic [25:0] target,
  output logic [31:0] inst_addr
);
  logic [29:0] pc_q, pc_plus1, pc_br, pc_next;
  logic        mux_sel;

  always_comb begin
    pc_plus1 = pc_q + 30'd1;
    pc_br    = pc_plus1 + {{14{imm16[15]}}, imm16};
    mux_sel  = npc_sel & equal;
    if (jump)         pc_next = {pc_plus1[29:26], target};
    else if (mux_sel) pc_next = pc_br;
    else              pc_next = pc_plus1;
    inst_addr = {pc_q, 2'b00};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pc_q <= '0;
    else        pc_q <= pc_next;
  end
endmodule
