// single_cycle_cpu_tb: runs the directed program and several random
// programs on single_cycle_cpu and compares the registers and every stored
// data word with the reference simulator (no delay slots). Checks that the
// processor takes exactly one cycle per instruction: the PC must reach the
// halt loop after as many cycles as the simulator executed instructions.
module single_cycle_cpu_tb;
  import mips_tb_pkg::*;
  localparam int RUNS = 6;

  logic        clk = 0, rst_n = 0;
  logic        prog_we = 0;
  logic [31:0] prog_addr = 0, prog_data = 0, pc, instruction;
  logic [4:0]  dbg_reg_addr = 0;
  logic [31:0] dbg_reg_data, dbg_mem_addr = 0, dbg_mem_data;
  logic [31:0] prog [256];
  int checks = 0, failures = 0;

  single_cycle_cpu dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_data, .pc, .instruction,
                        .dbg_reg_addr, .dbg_reg_data, .dbg_mem_addr, .dbg_mem_data);

  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic run_one(input int halt);
    mips_iss iss = new(1'b0);
    int cycles;
    foreach (prog[i]) iss.imem[i] = prog[i];
    iss.run(halt, 5000);
    // load with the processor held in reset
    rst_n = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = i; prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0; rst_n = 1;
    cycles = 0;
    while (pc != 32'(halt * 4) && cycles < 6000) begin
      @(posedge clk); cycles++; #1;
    end
    chk(cycles, iss.executed, "cycles to reach halt (CPI 1)");
    repeat (3) @(posedge clk);
    chk(pc, 32'(halt * 4), "stays in halt loop");
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
    #2000000; failures++;
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
