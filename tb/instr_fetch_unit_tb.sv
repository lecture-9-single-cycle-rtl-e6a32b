// instr_fetch_unit_tb: drives random branch, equal and jump inputs and
// compares the PC after every edge with a reference next-address rule:
// PC+4, PC+4+SignExt(imm16)*4 when branch AND equal, or the jump target.
module instr_fetch_unit_tb;
  logic        clk = 0, rst_n = 0;
  logic        npc_sel, equal, jump;
  logic [15:0] imm16;
  logic [25:0] target;
  logic [31:0] inst_addr, exp_pc, p4;
  int checks = 0, failures = 0, n_br = 0, n_j = 0;

  instr_fetch_unit dut (.clk, .rst_n, .npc_sel, .equal, .jump, .imm16, .target, .inst_addr);

  always #5 clk = ~clk;

  task automatic chk(input string what);
    checks++;
    if (inst_addr !== exp_pc) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, inst_addr, exp_pc);
    end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    npc_sel = 0; equal = 0; jump = 0; imm16 = 0; target = 0;
    exp_pc = 0;
    @(negedge clk) rst_n = 1;
    chk("reset");
    for (int i = 0; i < 2000; i++) begin
      npc_sel = ($urandom % 3) == 0;
      equal   = $urandom % 2;
      jump    = ($urandom % 8) == 0 && !npc_sel;
      imm16   = 16'($urandom);
      target  = 26'($urandom);
      @(posedge clk);
      p4 = exp_pc + 32'd4;
      if (jump)                begin exp_pc = {p4[31:28], target, 2'b00}; n_j++; end
      else if (npc_sel && equal) begin exp_pc = exp_pc + 4 + {{14{imm16[15]}}, imm16, 2'b00}; n_br++; end
      else                     exp_pc = exp_pc + 4;
      #1 chk("next pc");
      @(negedge clk);
    end
    checks++;
    if (n_br == 0 || n_j == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
