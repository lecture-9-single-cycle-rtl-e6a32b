// mips_top_tb: end-to-end test of mips_top at its default sizes. Loads the
// same programs (the directed program, then random ones) into both
// processors, runs them from reset and compares each with the reference
// simulator: the single-cycle one without delay slots, finishing in one
// cycle per instruction; the pipelined one with delay slots, finishing in
// one cycle per instruction plus the predicted interlock stalls, four
// cycles of pipeline fill. Counts each mechanism (single-cycle branches and
// jumps; pipeline stalls, forwarding, register-file bypass, delayed branches
// and jumps) and fails if one never happened.
module mips_top_tb;
  import mips_pkg::*;
  import mips_tb_pkg::*;
  localparam int RUNS = 4;

  logic         clk = 0, rst_n = 0;
  logic         sc_prog_we = 0, pl_prog_we = 0;
  logic [31:0]  sc_prog_addr = 0, sc_prog_data = 0, pl_prog_addr = 0, pl_prog_data = 0;
  logic [31:0]  sc_pc, sc_instruction, pl_pc;
  logic         pl_retire;
  pipe_events_t pl_events;
  logic [4:0]   sc_dbg_reg_addr = 0, pl_dbg_reg_addr = 0;
  logic [31:0]  sc_dbg_reg_data, pl_dbg_reg_data;
  logic [31:0]  sc_dbg_mem_addr = 0, pl_dbg_mem_addr = 0, sc_dbg_mem_data, pl_dbg_mem_data;
  logic [31:0]  prog [256];
  int checks = 0, failures = 0;
  int sc_br = 0;
  int n_lu = 0, n_bs = 0, n_fex = 0, n_fid = 0, n_byp = 0, n_br = 0, n_j = 0;

  mips_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic run_one(input int halt);
    mips_iss sc_iss = new(1'b0);
    mips_iss pl_iss = new(1'b1);
    int cycles, retired, stalls, sc_done, pl_done;
    foreach (prog[i]) begin sc_iss.imem[i] = prog[i]; pl_iss.imem[i] = prog[i]; end
    sc_iss.run(halt, 5000);
    pl_iss.run(halt, 5000);
    rst_n = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      sc_prog_we = 1; sc_prog_addr = i; sc_prog_data = prog[i];
      pl_prog_we = 1; pl_prog_addr = i; pl_prog_data = prog[i];
    end
    @(negedge clk); sc_prog_we = 0; pl_prog_we = 0; rst_n = 1;
    cycles = 0; retired = 0; stalls = 0; sc_done = -1; pl_done = -1;
    while (cycles < 8000 && (sc_done < 0 || pl_done < 0)) begin
      #1;
      if (sc_done < 0 && sc_pc == 32'(halt * 4)) sc_done = cycles;
      @(posedge clk); cycles++;
      #1;
      if (pl_retire) begin
        retired++;
        if (retired == pl_iss.executed + 1) pl_done = cycles;
      end
      if (pl_events.load_use_stall || pl_events.branch_stall) stalls++;
      n_lu  += int'(pl_events.load_use_stall);
      n_bs  += int'(pl_events.branch_stall);
      n_fex += int'(pl_events.fwd_ex);
      n_fid += int'(pl_events.fwd_id);
      n_byp += int'(pl_events.rf_bypass);
      n_br  += int'(pl_events.branch_taken);
      n_j   += int'(pl_events.jump_taken);
    end
    sc_br += sc_iss.taken;
    chk(sc_done, sc_iss.executed, "single-cycle: cycles to reach halt");
    chk(pl_done, pl_iss.id_cycle + 3, "pipelined: cycle in which halt retires");
    chk(stalls, pl_iss.stall_cycles, "pipelined: stall cycles");
    repeat (4) @(posedge clk);
    #1;
    for (int r = 0; r < 32; r++) begin
      sc_dbg_reg_addr = 5'(r); pl_dbg_reg_addr = 5'(r); #1;
      chk(sc_dbg_reg_data, sc_iss.regs[r], $sformatf("single-cycle reg %0d", r));
      chk(pl_dbg_reg_data, pl_iss.regs[r], $sformatf("pipelined reg %0d", r));
    end
    for (int w = 0; w < 256; w++) begin
      sc_dbg_mem_addr = 32'(w * 4); pl_dbg_mem_addr = 32'(w * 4); #1;
      if (sc_iss.written[w]) chk(sc_dbg_mem_data, sc_iss.dmem[w], $sformatf("single-cycle mem %0d", w));
      if (pl_iss.written[w]) chk(pl_dbg_mem_data, pl_iss.dmem[w], $sformatf("pipelined mem %0d", w));
    end
  endtask

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int h;
    h = directed_program(prog);
    run_one(h);
    for (int k = 0; k < RUNS; k++) begin
      h = random_program(prog, 220);
      run_one(h);
    end
    $display("single-cycle: taken branches and jumps %0d", sc_br);
    $display("pipelined: load-use stalls %0d, branch stalls %0d, EX forwards %0d, ID forwards %0d, register-file bypasses %0d, taken branches %0d, jumps %0d",
             n_lu, n_bs, n_fex, n_fid, n_byp, n_br, n_j);
    checks += 8;
    if (sc_br == 0) failures++;
    if (n_lu == 0) failures++;
    if (n_bs == 0) failures++;
    if (n_fex == 0) failures++;
    if (n_fid == 0) failures++;
    if (n_byp == 0) failures++;
    if (n_br == 0) failures++;
    if (n_j == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
