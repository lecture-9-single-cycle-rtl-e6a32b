// pipelined_cpu: five-stage pipelined MIPS-lite processor.
//
// Stages: IF (fetch, PC+4), ID (decode, register read, branch decision),
// EX (ALU), MEM (data memory), WB (register write-back). Instruction and
// data memories are separate, so fetch and a load or store never compete
// for one memory. The register file is written in the first half of a cycle
// and read in the second half, modelled by its write-to-read bypass.
//
// Control hazards: beq is compared and j is resolved in ID, and branches are
// delayed: the one instruction after a branch or jump (the delay slot) is
// always executed, whether or not the branch is taken. Branches then idle
// in EX, MEM and WB.
// Data hazards: ALU results are forwarded from MEM and WB to EX; an
// instruction that uses a register loaded by the instruction just ahead of
// it is held in ID for one cycle (interlock) and then fed from WB.
// These mechanisms follow the pipeline's description. The handling of beq
// operands that are not ready in ID (stall, or forwarding from MEM), reset to
// PC 0, memory depths and the observation ports are this design's choices.
//
// Interface: as single_cycle_cpu. Hold rst_n low while loading the program.
// retire pulses in the cycle an instruction leaves WB (bubbles do not
// retire); events shows which hazard mechanism acted in each cycle.
module pipelined_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         prog_we,
  input  logic [31:0]  prog_addr,
  input  logic [31:0]  prog_data,
  output logic [31:0]  pc,
  output logic         retire,
  output pipe_events_t events,
  input  logic [4:0]   dbg_reg_addr,
  output logic [31:0]  dbg_reg_data,
  input  logic [31:0]  dbg_mem_addr,
  output logic [31:0]  dbg_mem_data
);
  // ---------------------------------------------------------------- registers
  typedef struct packed {
    logic        valid;
    logic [31:0] instr;
    logic [31:0] pc4;
  } if_id_t;

  typedef struct packed {
    logic        valid;
    ctrl_t       ctrl;
    logic [4:0]  rs, rt, rd;
    logic [31:0] bus_a, bus_b, imm32;
  } id_ex_t;

  typedef struct packed {
    logic        valid;
    logic        reg_write, mem_to_reg, mem_write;
    logic [4:0]  rw;
    logic [31:0] alu_out, store_data;
  } ex_mem_t;

  typedef struct packed {
    logic        valid;
    logic        reg_write, mem_to_reg;
    logic [4:0]  rw;
    logic [31:0] alu_out, mem_out;
  } mem_wb_t;

  logic [31:0] pc_q;
  if_id_t      ifid;
  id_ex_t      idex;
  ex_mem_t     exmem;
  mem_wb_t     memwb;

  // -------------------------------------------------------------------- IF
  logic [31:0] if_instr, pc_plus4, pc_next;

  inst_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .adr(pc_q), .instruction(if_instr), .prog_we, .prog_addr, .prog_data
  );

  // -------------------------------------------------------------------- ID
  ctrl_t       id_ctrl;
  logic [4:0]  id_rs, id_rt;
  logic [31:0] id_bus_a, id_bus_b, id_imm32, id_cmp_a, id_cmp_b;
  logic [31:0] br_target, j_target;
  logic        id_uses_rs, id_uses_rt, id_equal, br_taken, j_taken;
  logic        stall, load_use_stall, branch_stall, fwd_br_a, fwd_br_b;
  fwd_sel_e    fwd_a, fwd_b;
  logic [31:0] wb_bus_w;

  main_control u_ctrl (
    .op(f_op(ifid.instr)), .func(f_func(ifid.instr)), .ctrl(id_ctrl)
  );

  regfile #(.BYPASS(1'b1)) u_rf (
    .clk, .rst_n,
    .ra(id_rs), .rb(id_rt), .bus_a(id_bus_a), .bus_b(id_bus_b),
    .reg_wr(memwb.reg_write), .rw(memwb.rw), .bus_w(wb_bus_w),
    .dbg_ra(dbg_reg_addr), .dbg_rd(dbg_reg_data)
  );

  extender u_ext (
    .imm16(f_imm16(ifid.instr)), .ext_op(id_ctrl.ext_op), .imm32(id_imm32)
  );

  always_comb begin
    id_rs      = f_rs(ifid.instr);
    id_rt      = f_rt(ifid.instr);
    // rs is read by every instruction but j; rt by R-type, sw and beq
    id_uses_rs = !id_ctrl.jump;
    id_uses_rt = (f_op(ifid.instr) == OP_RTYPE) || id_ctrl.mem_write || id_ctrl.npc_sel;
    // branch comparator in decode
    id_cmp_a   = fwd_br_a ? exmem.alu_out : id_bus_a;
    id_cmp_b   = fwd_br_b ? exmem.alu_out : id_bus_b;
    id_equal   = (id_cmp_a == id_cmp_b);
    // "PC Ext": the branch offset is always sign-extended, whatever ExtOp
    br_target  = ifid.pc4 + {{14{ifid.instr[15]}}, f_imm16(ifid.instr), 2'b00};
    j_target   = {ifid.pc4[31:28], f_target(ifid.instr), 2'b00};
    br_taken   = ifid.valid && id_ctrl.npc_sel && id_equal && !stall;
    j_taken    = ifid.valid && id_ctrl.jump && !stall;
  end

  // next PC: the instruction now in IF is the delay slot and is kept
  always_comb begin
    pc_plus4 = pc_q + 32'd4;
    if (stall)         pc_next = pc_q;
    else if (j_taken)  pc_next = j_target;
    else if (br_taken) pc_next = br_target;
    else               pc_next = pc_plus4;
  end

  // -------------------------------------------------------------------- EX
  logic [31:0] ex_a, ex_b_reg, ex_b, ex_alu_out;

  hazard_unit u_hz (
    .id_rs, .id_rt, .id_uses_rs(id_uses_rs && ifid.valid),
    .id_uses_rt(id_uses_rt && ifid.valid),
    .id_branch(ifid.valid && id_ctrl.npc_sel),
    .ex_rs(idex.rs), .ex_rt(idex.rt),
    .ex_reg_write(idex.ctrl.reg_write), .ex_mem_to_reg(idex.ctrl.mem_to_reg),
    .ex_rw(idex.ctrl.reg_dst ? idex.rd : idex.rt),
    .mem_reg_write(exmem.reg_write), .mem_mem_to_reg(exmem.mem_to_reg),
    .mem_rw(exmem.rw),
    .wb_reg_write(memwb.reg_write), .wb_rw(memwb.rw),
    .fwd_a, .fwd_b, .fwd_br_a, .fwd_br_b, .load_use_stall, .branch_stall, .stall
  );

  function automatic logic [31:0] fwd_mux(input fwd_sel_e s, input logic [31:0] reg_val);
    unique case (s)
      FWD_MEM: return exmem.alu_out;
      FWD_WB:  return wb_bus_w;
      default: return reg_val;
    endcase
  endfunction

  always_comb begin
    ex_a     = fwd_mux(fwd_a, idex.bus_a);
    ex_b_reg = fwd_mux(fwd_b, idex.bus_b);
    ex_b     = idex.ctrl.alu_src ? idex.imm32 : ex_b_reg;
  end

  alu u_alu (
    .a(ex_a), .b(ex_b), .alu_ctr(idex.ctrl.alu_ctr), .result(ex_alu_out), .zero()
  );

  // ------------------------------------------------------------------- MEM
  logic [31:0] mem_out;

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .wr_en(exmem.mem_write), .adr(exmem.alu_out), .data_in(exmem.store_data),
    .data_out(mem_out), .dbg_addr(dbg_mem_addr), .dbg_data(dbg_mem_data)
  );

  // -------------------------------------------------------------------- WB
  always_comb wb_bus_w = memwb.mem_to_reg ? memwb.mem_out : memwb.alu_out;

  // ------------------------------------------------------ pipeline registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q  <= '0;
      ifid  <= '0;
      idex  <= '0;
      exmem <= '0;
      memwb <= '0;
    end else begin
      pc_q <= pc_next;

      if (!stall) begin
        ifid.valid <= 1'b1;
        ifid.instr <= if_instr;
        ifid.pc4   <= pc_plus4;
      end

      if (stall || !ifid.valid) begin
        idex <= '0;  // bubble
      end else begin
        idex.valid <= 1'b1;
        idex.ctrl  <= id_ctrl;
        idex.rs    <= id_rs;
        idex.rt    <= id_rt;
        idex.rd    <= f_rd(ifid.instr);
        idex.bus_a <= id_bus_a;
        idex.bus_b <= id_bus_b;
        idex.imm32 <= id_imm32;
      end

      exmem.valid      <= idex.valid;
      exmem.reg_write  <= idex.ctrl.reg_write;
      exmem.mem_to_reg <= idex.ctrl.mem_to_reg;
      exmem.mem_write  <= idex.ctrl.mem_write;
      exmem.rw         <= idex.ctrl.reg_dst ? idex.rd : idex.rt;
      exmem.alu_out    <= ex_alu_out;
      exmem.store_data <= ex_b_reg;

      memwb.valid      <= exmem.valid;
      memwb.reg_write  <= exmem.reg_write;
      memwb.mem_to_reg <= exmem.mem_to_reg;
      memwb.rw         <= exmem.rw;
      memwb.alu_out    <= exmem.alu_out;
      memwb.mem_out    <= mem_out;
    end
  end

  // ----------------------------------------------------------- observation
  always_comb begin
    pc     = pc_q;
    retire = memwb.valid;
    events.load_use_stall = load_use_stall;
    events.branch_stall   = branch_stall;
    events.fwd_ex         = idex.valid &&
                            (fwd_a != FWD_NONE ||
                             (fwd_b != FWD_NONE && (!idex.ctrl.alu_src || idex.ctrl.mem_write)));
    events.fwd_id         = ifid.valid && id_ctrl.npc_sel && (fwd_br_a || fwd_br_b) && !stall;
    events.rf_bypass      = ifid.valid && memwb.reg_write && memwb.rw != 5'd0 &&
                            ((id_uses_rs && memwb.rw == id_rs) || (id_uses_rt && memwb.rw == id_rt));
    events.branch_taken   = br_taken;
    events.jump_taken     = j_taken;
  end

  // a stall never coincides with a redirect of the fetch
  assert property (@(posedge clk) disable iff (!rst_n) stall |-> !(br_taken || j_taken));
endmodule
