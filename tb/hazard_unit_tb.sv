// hazard_unit_tb: drives random pipeline situations (register numbers drawn
// from a small set so that matches are frequent) and compares every output
// with a reference written from the hazard rules: forward from memory
// access before write-back, never for register 0; stall one cycle for a
// load whose result the decode instruction uses; stall a beq whose operand
// is written by the instruction in execute or loaded by the one in memory
// access; feed the comparator from memory access otherwise.
module hazard_unit_tb;
  import mips_pkg::*;
  logic [4:0] id_rs, id_rt, ex_rs, ex_rt, ex_rw, mem_rw, wb_rw;
  logic       id_uses_rs, id_uses_rt, id_branch, ex_reg_write, ex_mem_to_reg;
  logic       mem_reg_write, mem_mem_to_reg, wb_reg_write;
  fwd_sel_e   fwd_a, fwd_b;
  logic       fwd_br_a, fwd_br_b, load_use_stall, branch_stall, stall;
  int checks = 0, failures = 0, n_lu = 0, n_bs = 0, n_mem = 0, n_wb = 0;

  hazard_unit dut (.*);

  function automatic fwd_sel_e ref_fwd(input logic [4:0] r);
    if (r == 0) return FWD_NONE;
    if (mem_reg_write && mem_rw == r) return FWD_MEM;
    if (wb_reg_write && wb_rw == r) return FWD_WB;
    return FWD_NONE;
  endfunction

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic lu, bs, a_ex, b_ex, a_ml, b_ml;
      {id_rs, id_rt, ex_rs, ex_rt, ex_rw, mem_rw, wb_rw} = '0;
      id_rs = 5'($urandom % 4); id_rt = 5'($urandom % 4);
      ex_rs = 5'($urandom % 4); ex_rt = 5'($urandom % 4);
      ex_rw = 5'($urandom % 4); mem_rw = 5'($urandom % 4); wb_rw = 5'($urandom % 4);
      {id_uses_rs, id_uses_rt, id_branch, ex_reg_write, ex_mem_to_reg,
       mem_reg_write, mem_mem_to_reg, wb_reg_write} = 8'($urandom);
      #1;
      a_ex = ex_reg_write && ex_rw != 0 && ex_rw == id_rs;
      b_ex = ex_reg_write && ex_rw != 0 && ex_rw == id_rt;
      a_ml = mem_reg_write && mem_mem_to_reg && mem_rw != 0 && mem_rw == id_rs;
      b_ml = mem_reg_write && mem_mem_to_reg && mem_rw != 0 && mem_rw == id_rt;
      lu = ex_mem_to_reg && ((id_uses_rs && a_ex) || (id_uses_rt && b_ex));
      bs = !lu && id_branch && (a_ex || b_ex || a_ml || b_ml);
      chk(fwd_a, ref_fwd(ex_rs), "fwd_a");
      chk(fwd_b, ref_fwd(ex_rt), "fwd_b");
      chk(fwd_br_a, id_rs != 0 && mem_reg_write && !mem_mem_to_reg && mem_rw == id_rs, "fwd_br_a");
      chk(fwd_br_b, id_rt != 0 && mem_reg_write && !mem_mem_to_reg && mem_rw == id_rt, "fwd_br_b");
      chk(load_use_stall, lu, "load_use_stall");
      chk(branch_stall, bs, "branch_stall");
      chk(stall, lu || bs, "stall");
      n_lu += int'(lu); n_bs += int'(bs);
      n_mem += int'(fwd_a == FWD_MEM); n_wb += int'(fwd_a == FWD_WB);
    end
    checks++;
    if (n_lu == 0 || n_bs == 0 || n_mem == 0 || n_wb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
