// hazard_unit: forwarding selects and interlock of the five-stage pipeline.
//
// Forwarding to execute: an ALU operand whose register is written by the
// instruction one stage ahead (in memory access) takes that instruction's
// ALU result (FWD_MEM); failing that, if the instruction two ahead (in
// write-back) writes it, it takes the write-back value (FWD_WB). Register 0
// is never forwarded.
//
// Load interlock: a load's data exists only after the memory stage, so an
// instruction in decode that reads the register a load in execute is about
// to fetch is held for one cycle and a bubble goes down the pipe; after that
// the value is forwarded from write-back.
//
// Branch interlock: beq compares its operands in decode. An operand that
// the instruction in execute will write is not ready yet (one-cycle stall);
// one that a load in memory access will write is not ready either (one more
// cycle). An operand produced by a non-load instruction in memory access is
// forwarded to the comparator (fwd_br_*). Values in write-back reach decode
// through the register file's write-then-read behaviour.
//
// Forwarding and the load interlock follow the pipeline's description; the
// branch interlock and comparator forwarding are this design's way of
// feeding a comparator placed in decode. Purely combinational.
module hazard_unit
  import mips_pkg::*;
(
  // decode stage
  input  logic [4:0] id_rs,
  input  logic [4:0] id_rt,
  input  logic       id_uses_rs,
  input  logic       id_uses_rt,
  input  logic       id_branch,
  // execute stage
  input  logic [4:0] ex_rs,
  input  logic [4:0] ex_rt,
  input  logic       ex_reg_write,
  input  logic       ex_mem_to_reg,
  input  logic [4:0] ex_rw,
  // memory-access stage
  input  logic       mem_reg_write,
  input  logic       mem_mem_to_reg,
  input  logic [4:0] mem_rw,
  // write-back stage
  input  logic       wb_reg_write,
  input  logic [4:0] wb_rw,
  // results
  output fwd_sel_e   fwd_a,
  output fwd_sel_e   fwd_b,
  output logic       fwd_br_a,
  output logic       fwd_br_b,
  output logic       load_use_stall,
  output logic       branch_stall,
  output logic       stall
);
  function automatic fwd_sel_e ex_src(input logic [4:0] r);
    if (mem_reg_write && mem_rw != 5'd0 && mem_rw == r) return FWD_MEM;
    if (wb_reg_write && wb_rw != 5'd0 && wb_rw == r)    return FWD_WB;
    return FWD_NONE;
  endfunction

  logic ex_writes_rs, ex_writes_rt, mem_loads_rs, mem_loads_rt;

  always_comb begin
    fwd_a = ex_src(ex_rs);
    fwd_b = ex_src(ex_rt);

    fwd_br_a = mem_reg_write && !mem_mem_to_reg && mem_rw != 5'd0 && mem_rw == id_rs;
    fwd_br_b = mem_reg_write && !mem_mem_to_reg && mem_rw != 5'd0 && mem_rw == id_rt;

    ex_writes_rs = ex_reg_write && ex_rw != 5'd0 && ex_rw == id_rs;
    ex_writes_rt = ex_reg_write && ex_rw != 5'd0 && ex_rw == id_rt;
    mem_loads_rs = mem_reg_write && mem_mem_to_reg && mem_rw != 5'd0 && mem_rw == id_rs;
    mem_loads_rt = mem_reg_write && mem_mem_to_reg && mem_rw != 5'd0 && mem_rw == id_rt;

    load_use_stall = ex_mem_to_reg && ((id_uses_rs && ex_writes_rs) ||
                                       (id_uses_rt && ex_writes_rt));
    branch_stall   = id_branch && !load_use_stall &&
                     (ex_writes_rs || ex_writes_rt || mem_loads_rs || mem_loads_rt);
    stall          = load_use_stall || branch_stall;
  end
endmodule
