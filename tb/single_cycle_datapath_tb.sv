// single_cycle_datapath_tb: drives single_cycle_datapath with one
// instruction per cycle and the control settings of the control-signal
// table (written out here, not taken from the controller), and checks the
// register file, the data memory and the Zero output against a reference
// model of add, sub, ori, lw, sw and beq's comparison.
module single_cycle_datapath_tb;
  import mips_pkg::*;
  import mips_tb_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [31:0] instruction;
  ctrl_t       ctrl;
  logic        zero;
  logic [4:0]  dbg_reg_addr = 0;
  logic [31:0] dbg_reg_data, dbg_mem_addr = 0, dbg_mem_data;
  logic [31:0] r [32];
  logic [31:0] m [64];
  int checks = 0, failures = 0;

  single_cycle_datapath #(.DMEM_WORDS(64)) dut (.clk, .rst_n, .instruction, .ctrl, .zero,
    .dbg_reg_addr, .dbg_reg_data, .dbg_mem_addr, .dbg_mem_data);

  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  // RegDst ALUSrc MemtoReg RegWrite MemWrite nPCsel Jump ExtOp ALUctr
  function automatic ctrl_t table_row(input int k);
    case (k)
      0: return ctrl_t'({8'b1001_0000, ALU_ADD});  // add
      1: return ctrl_t'({8'b1001_0000, ALU_SUB});  // sub
      2: return ctrl_t'({8'b0101_0000, ALU_OR});   // ori
      3: return ctrl_t'({8'b0111_0001, ALU_ADD});  // lw
      4: return ctrl_t'({8'b0100_1001, ALU_ADD});  // sw
      default: return ctrl_t'({8'b0000_0100, ALU_SUB});  // beq
    endcase
  endfunction

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (r[i]) r[i] = 0;
    ctrl = '0; instruction = NOP;
    @(negedge clk) rst_n = 1;
    // clear the data words used
    for (int w = 0; w < 64; w++) begin
      instruction = SW(0, 16'(w * 4), 0); ctrl = table_row(4); m[w] = 0;
      @(negedge clk);
    end
    for (int i = 0; i < 3000; i++) begin
      int k;
      logic [4:0] a, b, c;
      logic [15:0] imm;
      logic [31:0] addr;
      k = $urandom % 6;
      a = 5'(1 + $urandom % 7); b = 5'($urandom % 8); c = 5'($urandom % 8);
      imm = 16'($urandom);
      if (k == 3 || k == 4) begin  // address inside the 64 words, base r[b]
        addr = {24'h0, 6'($urandom), 2'b00};
        imm  = 16'(addr - r[b]);
        if ({{16{imm[15]}}, imm} + r[b] != addr) begin b = 0; imm = addr[15:0]; end
      end
      case (k)
        0: instruction = ADD(a, b, c);
        1: instruction = SUB(a, b, c);
        2: instruction = ORI(a, b, imm);
        3: instruction = LW(a, imm, b);
        4: instruction = SW(c, imm, b);
        default: instruction = BEQ(b, c, imm);
      endcase
      ctrl = table_row(k);
      #1;
      if (k == 5 || k == 1) chk(zero, r[b] == r[c], "zero");
      @(posedge clk);
      case (k)
        0: r[a] = r[b] + r[c];
        1: r[a] = r[b] - r[c];
        2: r[a] = r[b] | {16'h0, imm};
        3: r[a] = m[(r[b] + {{16{imm[15]}}, imm}) >> 2];
        4: m[(r[b] + {{16{imm[15]}}, imm}) >> 2] = r[c];
        default: ;
      endcase
      r[0] = 0;
      @(negedge clk);
      if (i % 50 == 49) begin
        ctrl = '0;  // no writes while the registers are inspected
        for (int q = 0; q < 8; q++) begin
          dbg_reg_addr = 5'(q); #1 chk(dbg_reg_data, r[q], $sformatf("reg %0d", q));
        end
      end
    end
    ctrl = '0;
    for (int w = 0; w < 64; w++) begin
      dbg_mem_addr = 32'(w * 4); #1 chk(dbg_mem_data, m[w], $sformatf("mem %0d", w));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
