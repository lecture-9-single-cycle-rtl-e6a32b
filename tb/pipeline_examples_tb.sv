// pipeline_examples_tb: runs the classic five-stage pipeline examples on
// pipelined_cpu and checks the cycle in which each instruction retires as
// well as the results.
//   A  lw, add, sw, sub, ori with no dependences: after the 4-cycle fill one
//      instruction retires per cycle (ori stands in for an R-type or, which
//      the instruction subset lacks).
//   B  add $8 followed by four instructions that read $8: forwarding from
//      MEM and WB and the register file's write-then-read remove every stall.
//   C  lw $8 followed by sub, add and ori that read $8: exactly one bubble,
//      after the load; the rest follow back to back.
//   D  add, then beq taken with a nop in its delay slot, then lw at the
//      target: the delayed branch costs no cycle and the instruction after
//      the delay slot is skipped.
module pipeline_examples_tb;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  logic         clk = 0, rst_n = 0;
  logic         prog_we = 0;
  logic [31:0]  prog_addr = 0, prog_data = 0, pc;
  logic         retire;
  pipe_events_t events;
  logic [4:0]   dbg_reg_addr = 0;
  logic [31:0]  dbg_reg_data, dbg_mem_addr = 0, dbg_mem_data;
  logic [31:0]  prog [256];
  int           ret_cycle [64];
  int           n_ret, n_stall;
  int checks = 0, failures = 0;

  pipelined_cpu dut (.clk, .rst_n, .prog_we, .prog_addr, .prog_data, .pc, .retire, .events,
                     .dbg_reg_addr, .dbg_reg_data, .dbg_mem_addr, .dbg_mem_data);

  always #5 clk = ~clk;

  task automatic chk(input int got, exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic reg_is(input logic [4:0] r, input logic [31:0] v, input string ex);
    dbg_reg_addr = r; #1;
    chk(int'(dbg_reg_data), int'(v), $sformatf("%s: $%0d", ex, r));
  endtask

  // load prog, run for a fixed number of cycles, record retirement cycles
  task automatic run(input int n_cycles);
    rst_n = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = i; prog_data = prog[i];
    end
    @(negedge clk); prog_we = 0; rst_n = 1;
    n_ret = 0; n_stall = 0;
    for (int c = 1; c <= n_cycles; c++) begin
      @(posedge clk); #1;
      if (retire && n_ret < 64) begin ret_cycle[n_ret] = c; n_ret++; end
      n_stall += int'(events.load_use_stall || events.branch_stall);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // ---- A: five independent instructions
    foreach (prog[i]) prog[i] = NOP;
    prog[0] = LW(1, 16'd0, 0);
    prog[1] = ADD(2, 3, 4);
    prog[2] = SW(5, 16'd4, 0);
    prog[3] = SUB(6, 7, 8);
    prog[4] = ORI(9, 10, 16'd1);
    prog[5] = BEQ(0, 0, 16'hffff);
    run(12);
    for (int k = 0; k < 5; k++) chk(ret_cycle[k], 4 + k, $sformatf("A: retire cycle of instruction %0d", k));
    chk(n_stall, 0, "A: stalls");
    reg_is(9, 32'd1, "A");

    // ---- B: one producer, four consumers
    foreach (prog[i]) prog[i] = NOP;
    prog[0] = ORI(9, 0, 16'd20);
    prog[1] = ORI(10, 0, 16'd22);
    prog[2] = ORI(11, 0, 16'd2);
    prog[3] = ADD(8, 9, 10);    // $8 = 42
    prog[4] = SUB(12, 8, 11);   // 40, from MEM
    prog[5] = ADD(13, 8, 8);    // 84, from WB
    prog[6] = SUB(14, 8, 0);    // 42, register-file write-then-read
    prog[7] = ADD(15, 0, 8);    // 42, register file
    prog[8] = BEQ(0, 0, 16'hffff);
    run(16);
    for (int k = 0; k < 8; k++) chk(ret_cycle[k], 4 + k, $sformatf("B: retire cycle of instruction %0d", k));
    chk(n_stall, 0, "B: stalls");
    reg_is(12, 32'd40, "B"); reg_is(13, 32'd84, "B"); reg_is(14, 32'd42, "B"); reg_is(15, 32'd42, "B");

    // ---- C: load followed by three users
    foreach (prog[i]) prog[i] = NOP;
    prog[0] = ORI(9, 0, 16'h0040);
    prog[1] = ORI(1, 0, 16'd1000);
    prog[2] = SW(1, 16'd0, 9);
    prog[3] = ORI(10, 0, 16'd1);
    prog[4] = LW(8, 16'd0, 9);    // $8 = 1000
    prog[5] = SUB(11, 8, 10);     // 999, one bubble
    prog[6] = ADD(12, 8, 8);      // 2000
    prog[7] = ORI(13, 8, 16'd7);  // 1007
    prog[8] = BEQ(0, 0, 16'hffff);
    run(18);
    for (int k = 0; k < 5; k++) chk(ret_cycle[k], 4 + k, $sformatf("C: retire cycle of instruction %0d", k));
    for (int k = 5; k < 8; k++) chk(ret_cycle[k], 5 + k, $sformatf("C: retire cycle of instruction %0d", k));
    chk(n_stall, 1, "C: stalls");
    reg_is(11, 32'd999, "C"); reg_is(12, 32'd2000, "C"); reg_is(13, 32'd1007, "C");

    // ---- D: delayed branch
    foreach (prog[i]) prog[i] = NOP;
    prog[0] = ORI(9, 0, 16'h0040);
    prog[1] = ORI(1, 0, 16'd77);
    prog[2] = SW(1, 16'd0, 9);
    prog[3] = ADD(2, 1, 1);        // 154
    prog[4] = BEQ(0, 0, 16'd2);    // to 7
    prog[5] = NOP;                 // delay slot, always executed
    prog[6] = ORI(3, 0, 16'd5);    // skipped
    prog[7] = LW(4, 16'd0, 9);     // 77
    prog[8] = BEQ(0, 0, 16'hffff);
    run(16);
    for (int k = 0; k < 7; k++) chk(ret_cycle[k], 4 + k, $sformatf("D: retire cycle of instruction %0d", k));
    chk(n_stall, 0, "D: stalls");
    reg_is(2, 32'd154, "D"); reg_is(3, 32'd0, "D"); reg_is(4, 32'd77, "D");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
