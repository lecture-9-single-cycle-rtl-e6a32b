// single_cycle_cpu: MIPS-lite processor that completes one instruction per
// clock cycle.
//
// The instruction fetch unit supplies the PC to the instruction memory; the
// controller decodes op (bits 31:26) and func (bits 5:0) into the control
// points; the datapath reads registers, computes in the ALU, accesses the
// data memory and writes back, all in the same cycle; the ALU zero flag
// goes back to the fetch unit for beq. Supported: add, sub, ori, lw, sw,
// beq (no delay slot: the branch takes effect on the next fetch) and j.
// Branch and jump targets and the control equations follow the processor's
// specification; memory depths, reset to PC 0, the program-load port and
// the observation ports are this design's choices.
//
// Interface: hold rst_n low while loading the program with prog_we; after
// release, one instruction retires at every rising clock edge. pc and
// instruction show the instruction being executed in the current cycle.
module single_cycle_cpu
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data,
  output logic [31:0] pc,
  output logic [31:0] instruction,
  input  logic [4:0]  dbg_reg_addr,
  output logic [31:0] dbg_reg_data,
  input  logic [31:0] dbg_mem_addr,
  output logic [31:0] dbg_mem_data
);
  ctrl_t ctrl;
  logic  zero;

  instr_fetch_unit u_ifu (
    .clk, .rst_n,
    .npc_sel(ctrl.npc_sel), .equal(zero), .jump(ctrl.jump),
    .imm16(f_imm16(instruction)), .target(f_target(instruction)),
    .inst_addr(pc)
  );

  inst_memory #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .adr(pc), .instruction, .prog_we, .prog_addr, .prog_data
  );

  main_control u_ctrl (
    .op(f_op(instruction)), .func(f_func(instruction)), .ctrl
  );

  single_cycle_datapath #(.DMEM_WORDS(DMEM_WORDS)) u_dp (
    .clk, .rst_n, .instruction, .ctrl, .zero,
    .dbg_reg_addr, .dbg_reg_data, .dbg_mem_addr, .dbg_mem_data
  );
endmodule
