// pipelined_cpu_tb: runs the directed program and several random programs
// on pipelined_cpu and compares registers and stored data words with the
// reference simulator run with delay slots. Checks the timing: the halt
// instruction must retire in the cycle the simulator predicts from one
// instruction per cycle plus the interlock stalls, and the number of stall
// cycles the processor reports must equal the predicted number. Counts how
// often each hazard mechanism acted and fails if one never did.
module pipelined_cpu_tb;
  import mips_pkg::*;
  import mips_tb_pkg::*;
  localparam int RUNS = 6;

  logic         clk = 0, rst_n = 0;
  logic         prog_we = 0;
  logic [31:0]  prog_addr = 0, prog_data = 0, pc;
  logic         retire;
  pipe_events_t events;
  logic [4:0]   dbg_reg_addr = 0;
  logic [31:0]  dbg_reg_data, dbg_mem_addr = 0, dbg_mem_data;
  logic [31:0]  prog [256];
  int checks = 0, failures = 0;
  int n_lu = 0, n_bs = 0, n_fex = 0, n_fid = 0, n_byp = 0, n_br = 0, n_j = 0;

  pipelined_cpu dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_data, .pc, .retire, .events,
                     .dbg_reg_addr, .dbg_reg_data, .dbg_mem_addr, .dbg_mem_data);

  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0h exp %0h", what, got, exp);
    end
  endtask

  task automatic run_one(input int halt);
    mips_iss iss = new(1'b1);
    int cycles, retired, stalls, halt_cycle;
    foreach (prog[i]) iss.imem[i] = prog[i];
    iss.run(halt, 5000);
    rst_n = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = i; prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0; rst_n = 1;
    cycles = 0; retired = 0; stalls = 0; halt_cycle = -1;
    // the halt instruction is retirement number executed+1
    while (cycles < 8000 && halt_cycle < 0) begin
      @(posedge clk); cycles++;
      #1;
      if (retire) begin
        retired++;
        if (retired == iss.executed + 1) halt_cycle = cycles;
      end
      if (events.load_use_stall || events.branch_stall) stalls++;
      n_lu  += int'(events.load_use_stall);
      n_bs  += int'(events.branch_stall);
      n_fex += int'(events.fwd_ex);
      n_fid += int'(events.fwd_id);
      n_byp += int'(events.rf_bypass);
      n_br  += int'(events.branch_taken);
      n_j   += int'(events.jump_taken);
    end
    chk(halt_cycle, iss.id_cycle + 3, "cycle in which the halt instruction retires");
    chk(stalls, iss.stall_cycles, "stall cycles");
    repeat (4) @(posedge clk);
    #1;
    chk(32'(pc == 32'(halt * 4) || pc == 32'(halt * 4 + 4)), 32'd1, "fetch stays in halt loop");
    for (int r = 0; r < 32; r++) begin
      dbg_reg_addr = 5'(r); #1;
      chk(dbg_reg_data, iss.regs[r], $sformatf("reg %0d", r));
    end
    for (int w = 0; w < 256; w++) begin
      if (!iss.written[w]) continue;
      dbg_mem_addr = 32'(w * 4); #1;
      chk(dbg_mem_data, iss.dmem[w], $sformatf("mem word %0d", w));
    end
  endtask

  initial begin
    #3000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int h;
    h = directed_program(prog);
    run_one(h);
    for (int k = 0; k < RUNS; k++) begin
      h = random_program(prog, 200);
      run_one(h);
    end
    $display("events: load-use stalls %0d, branch stalls %0d, EX forwards %0d, ID forwards %0d, register-file bypasses %0d, taken branches %0d, jumps %0d",
             n_lu, n_bs, n_fex, n_fid, n_byp, n_br, n_j);
    checks += 7;
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
