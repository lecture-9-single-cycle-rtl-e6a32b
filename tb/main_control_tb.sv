// main_control_tb: checks every control signal of every instruction against
// the control-signal table (entries marked don't-care are not checked), and
// that opcodes and R-type functions outside the subset write no state.
module main_control_tb;
  import mips_pkg::*;
  logic [5:0] op, func;
  ctrl_t      ctrl;
  int checks = 0, failures = 0;

  main_control dut (.op, .func, .ctrl);

  // Bits: RegDst ALUSrc MemtoReg RegWrite MemWrite nPCsel Jump ExtOp ALUctr[1:0]
  task automatic row(input string name, input logic [5:0] o, f,
                     input logic [9:0] exp, input logic [9:0] care);
    op = o; func = f;
    #1;
    checks++;
    if (((ctrl ^ exp) & care) != 10'b0) begin
      failures++;
      $display("FAIL %s: got %b exp %b care %b", name, ctrl, exp, care);
    end
  endtask

  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    //                                     exp            care
    row("add",  6'b000000, 6'b100000, 10'b1001000000, 10'b1111111011);
    row("sub",  6'b000000, 6'b100010, 10'b1001000001, 10'b1111111011);
    row("ori",  6'b001101, 6'b000000, 10'b0101000010, 10'b1111111111);
    row("lw",   6'b100011, 6'b000000, 10'b0111000100, 10'b1111111111);
    row("sw",   6'b101011, 6'b000000, 10'b0100100100, 10'b0101111111);
    row("beq",  6'b000100, 6'b000000, 10'b0000010001, 10'b0101111011);
    row("jump", 6'b000010, 6'b000000, 10'b0000001000, 10'b0001101000);
    // func is ignored outside R-type
    row("ori/func", 6'b001101, 6'b100010, 10'b0101000010, 10'b1111111111);
    // undefined: no register or memory write, no branch or jump
    for (int i = 0; i < 200; i++) begin
      logic [5:0] o, f;
      o = 6'($urandom); f = 6'($urandom);
      if (o inside {6'b001101, 6'b100011, 6'b101011, 6'b000100, 6'b000010}) continue;
      if (o == 6'b0 && f inside {6'b100000, 6'b100010}) continue;
      row("undefined", o, f, 10'b0, 10'b0001111000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
