// single_cycle_datapath: register file, extender, ALU and data memory with
// the three steering muxes of the single-cycle processor.
//
// Rs and Rt address the register file's read ports (busA, busB). The RegDst
// mux picks rd (1) or rt (0) as the write register Rw. The ALUSrc mux feeds
// the ALU with busB (0) or the extended imm16 (1). The ALU result is the
// data memory address; busB is the store data. The MemtoReg mux returns the
// ALU result (0) or the memory word (1) on busW. Everything settles within
// the cycle and the register file and memory are written at the rising
// clock edge. The structure follows the single-cycle datapath description;
// the memory depth is this design's choice. The dbg_* ports only observe
// state.
module single_cycle_datapath
  import mips_pkg::*;
#(
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] instruction,
  input  ctrl_t       ctrl,
  output logic        zero,
  input  logic [4:0]  dbg_reg_addr,
  output logic [31:0] dbg_reg_data,
  input  logic [31:0] dbg_mem_addr,
  output logic [31:0] dbg_mem_data
);
  logic [4:0]  rs, rt, rd, rw;
  logic [31:0] bus_a, bus_b, bus_w, imm32, alu_b, alu_out, mem_out;

  always_comb begin
    rs    = f_rs(instruction);
    rt    = f_rt(instruction);
    rd    = f_rd(instruction);
    rw    = ctrl.reg_dst ? rd : rt;        // RegDst mux
    alu_b = ctrl.alu_src ? imm32 : bus_b;  // ALUSrc mux
    bus_w = ctrl.mem_to_reg ? mem_out : alu_out;  // MemtoReg mux
  end

  regfile #(.BYPASS(1'b0)) u_rf (
    .clk, .rst_n,
    .ra(rs), .rb(rt), .bus_a, .bus_b,
    .reg_wr(ctrl.reg_write), .rw, .bus_w,
    .dbg_ra(dbg_reg_addr), .dbg_rd(dbg_reg_data)
  );

  extender u_ext (
    .imm16(f_imm16(instruction)), .ext_op(ctrl.ext_op), .imm32
  );

  alu u_alu (
    .a(bus_a), .b(alu_b), .alu_ctr(ctrl.alu_ctr), .result(alu_out), .zero
  );

  data_memory #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .wr_en(ctrl.mem_write), .adr(alu_out), .data_in(bus_b),
    .data_out(mem_out), .dbg_addr(dbg_mem_addr), .dbg_data(dbg_mem_data)
  );
endmodule
