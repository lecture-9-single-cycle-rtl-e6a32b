// mips_top: the two MIPS-lite processors side by side.
//
// sc_* ports belong to the single-cycle processor, which executes one
// instruction per clock; pl_* ports to the five-stage pipelined processor,
// which overlaps five instructions and resolves its hazards by forwarding,
// a load interlock and delayed branches. Both execute the same instruction
// subset (add, sub, ori, lw, sw, beq, j) from their own instruction and data
// memories, which are loaded and observed through the ports described in
// single_cycle_cpu and pipelined_cpu. They share only clock and reset. Note
// that the pipelined processor executes the instruction after every branch
// and jump, while the single-cycle one does not, so a program must be
// written for one or the other unless every delay slot holds a no-op.
module mips_top
  import mips_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 256,
  parameter int unsigned DMEM_WORDS = 256
) (
  input  logic         clk,
  input  logic         rst_n,
  // single-cycle processor
  input  logic         sc_prog_we,
  input  logic [31:0]  sc_prog_addr,
  input  logic [31:0]  sc_prog_data,
  output logic [31:0]  sc_pc,
  output logic [31:0]  sc_instruction,
  input  logic [4:0]   sc_dbg_reg_addr,
  output logic [31:0]  sc_dbg_reg_data,
  input  logic [31:0]  sc_dbg_mem_addr,
  output logic [31:0]  sc_dbg_mem_data,
  // pipelined processor
  input  logic         pl_prog_we,
  input  logic [31:0]  pl_prog_addr,
  input  logic [31:0]  pl_prog_data,
  output logic [31:0]  pl_pc,
  output logic         pl_retire,
  output pipe_events_t pl_events,
  input  logic [4:0]   pl_dbg_reg_addr,
  output logic [31:0]  pl_dbg_reg_data,
  input  logic [31:0]  pl_dbg_mem_addr,
  output logic [31:0]  pl_dbg_mem_data
);
  single_cycle_cpu #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_sc (
    .clk, .rst_n,
    .prog_we(sc_prog_we), .prog_addr(sc_prog_addr), .prog_data(sc_prog_data),
    .pc(sc_pc), .instruction(sc_instruction),
    .dbg_reg_addr(sc_dbg_reg_addr), .dbg_reg_data(sc_dbg_reg_data),
    .dbg_mem_addr(sc_dbg_mem_addr), .dbg_mem_data(sc_dbg_mem_data)
  );

  pipelined_cpu #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_pl (
    .clk, .rst_n,
    .prog_we(pl_prog_we), .prog_addr(pl_prog_addr), .prog_data(pl_prog_data),
    .pc(pl_pc), .retire(pl_retire), .events(pl_events),
    .dbg_reg_addr(pl_dbg_reg_addr), .dbg_reg_data(pl_dbg_reg_data),
    .dbg_mem_addr(pl_dbg_mem_addr), .dbg_mem_data(pl_dbg_mem_data)
  );
endmodule
