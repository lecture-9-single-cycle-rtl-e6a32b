// mips_tb_pkg: test-bench helpers for the MIPS-lite processors.
//
// Instruction encoders (R-, I- and J-type formats) and a reference
// instruction-set simulator, mips_iss, written from the instruction
// definitions alone. The simulator runs a program with or without branch
// delay slots and, for the pipelined processor, predicts the cycle in which
// each instruction reaches decode from the stage in which each operand
// becomes available: an ALU result can be forwarded to execute one cycle
// after its producer left decode, a loaded word two cycles after; a beq
// operand must be in memory access (ALU result) or write-back (load) when
// beq is in decode.
package mips_tb_pkg;

  function automatic logic [31:0] enc_r(input logic [4:0] rd, rs, rt, input logic [5:0] fn);
    return {6'b00_0000, rs, rt, rd, 5'd0, fn};
  endfunction
  function automatic logic [31:0] enc_i(input logic [5:0] op, input logic [4:0] rt, rs,
                                        input logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic logic [31:0] ADD(input logic [4:0] rd, rs, rt);
    return enc_r(rd, rs, rt, 6'b10_0000);
  endfunction
  function automatic logic [31:0] SUB(input logic [4:0] rd, rs, rt);
    return enc_r(rd, rs, rt, 6'b10_0010);
  endfunction
  function automatic logic [31:0] ORI(input logic [4:0] rt, rs, input logic [15:0] imm);
    return enc_i(6'b00_1101, rt, rs, imm);
  endfunction
  function automatic logic [31:0] LW(input logic [4:0] rt, input logic [15:0] off, input logic [4:0] rs);
    return enc_i(6'b10_0011, rt, rs, off);
  endfunction
  function automatic logic [31:0] SW(input logic [4:0] rt, input logic [15:0] off, input logic [4:0] rs);
    return enc_i(6'b10_1011, rt, rs, off);
  endfunction
  function automatic logic [31:0] BEQ(input logic [4:0] rs, rt, input logic [15:0] off);
    return enc_i(6'b00_0100, rt, rs, off);
  endfunction
  function automatic logic [31:0] J(input logic [25:0] word_target);
    return {6'b00_0010, word_target};
  endfunction
  localparam logic [31:0] NOP = 32'h0000_0000;

  // Directed program: a counting loop (beq on a value just computed, j back),
  // store and reload, a load-use pair, a beq on a just-loaded value taken
  // over one instruction, and the halt loop. Delay slots hold useful work,
  // so the single-cycle and pipelined processors end in different states.
  // Returns the word address of the halt instruction.
  function automatic int directed_program(ref logic [31:0] p [256]);
    foreach (p[i]) p[i] = NOP;
    p[0]  = ORI(1, 0, 16'd5);       // counter
    p[1]  = ORI(2, 0, 16'd0);       // sum
    p[2]  = ORI(3, 0, 16'd1);
    p[3]  = ORI(10, 0, 16'h40);     // base address
    p[4]  = ADD(2, 2, 1);           // loop: sum += counter
    p[5]  = SUB(1, 1, 3);           // counter--
    p[6]  = BEQ(1, 0, 16'd3);       // to 10 when counter is 0
    p[7]  = ADD(12, 12, 3);         // delay slot (counts passes)
    p[8]  = J(26'd4);
    p[9]  = ADD(13, 13, 3);         // delay slot of the jump
    p[10] = SW(2, 16'd0, 10);
    p[11] = LW(4, 16'd0, 10);
    p[12] = ADD(5, 4, 4);           // uses the load just ahead
    p[13] = SUB(6, 5, 2);
    p[14] = LW(7, 16'd0, 10);
    p[15] = BEQ(7, 4, 16'd2);       // taken, to 18
    p[16] = ORI(8, 0, 16'd7);       // delay slot
    p[17] = ORI(9, 0, 16'd9);       // skipped
    p[18] = SW(6, 16'hfffc, 10);    // negative offset
    p[19] = ORI(11, 8, 16'h8000);
    p[20] = SUB(14, 0, 11);         // negative result
    p[21] = SW(14, 16'd4, 10);
    p[22] = BEQ(0, 0, 16'hffff);    // halt: branch to itself
    p[23] = NOP;
    return 22;
  endfunction

  // Random program of n instructions over registers 1..6 and data words
  // 0..63: first 64 stores clear those words, then ALU operations, loads,
  // stores, forward beq and j (never in a delay slot), then the halt loop at
  // word n. Returns n.
  function automatic int random_program(ref logic [31:0] p [256], input int n);
    bit prev_ctl = 0;
    foreach (p[i]) p[i] = NOP;
    for (int i = 0; i < 64; i++) p[i] = SW(0, 16'(i * 4), 0);
    for (int i = 64; i < n; i++) begin
      logic [4:0] a, b, c;
      int k, room;
      a = 5'(1 + $urandom % 6); b = 5'(1 + $urandom % 6); c = 5'(1 + $urandom % 6);
      if ($urandom % 10 == 0) b = 0;
      room = n - (i + 1);
      k = $urandom % 10;
      if (prev_ctl && k >= 8) k = 0;
      if (room < 2 && k >= 8) k = 1;
      case (k)
        0, 1: p[i] = ADD(a, b, c);
        2:    p[i] = SUB(a, b, c);
        3:    p[i] = ORI(a, b, 16'($urandom));
        4, 5: p[i] = LW(a, 16'(($urandom % 64) * 4), 0);
        6:    p[i] = SW(a, 16'(($urandom % 64) * 4), 0);
        7:    p[i] = ADD(a, a, b);
        8:    p[i] = BEQ(b, c, 16'(1 + $urandom % (room < 4 ? room : 4)));
        default: p[i] = J(26'(i + 2 + $urandom % (room - 1 < 3 ? room - 1 : 3)));
      endcase
      prev_ctl = (k >= 8);
    end
    p[n]   = BEQ(0, 0, 16'hffff);
    p[n+1] = NOP;
    return n;
  endfunction

  class mips_iss;
    logic [31:0] imem [256];
    logic [31:0] regs [32];
    logic [31:0] dmem [256];
    bit          written [256];
    bit          delayed;
    int          executed;      // instructions executed before the halt address
    int          stall_cycles;  // predicted pipeline stall cycles
    int          id_cycle;      // predicted decode cycle of the next instruction
    int          taken;         // taken branches and jumps

    function new(bit delayed_branches);
      delayed = delayed_branches;
      foreach (imem[i]) imem[i] = 32'h0;
      foreach (regs[i]) regs[i] = 32'h0;
      foreach (dmem[i]) begin dmem[i] = 32'h0; written[i] = 0; end
    endfunction

    // Run from word 0 until the PC reaches halt_word (not executed).
    function void run(int halt_word, int max_steps);
      int pc, npc, nnpc, c_prev;
      int wr_cycle [32];
      bit wr_load  [32];
      foreach (wr_cycle[i]) begin wr_cycle[i] = -100; wr_load[i] = 0; end
      pc = 0; npc = 1; executed = 0; stall_cycles = 0; c_prev = 0; taken = 0;
      while (pc != halt_word && executed < max_steps) begin
        logic [31:0] ins, a, b, imm_s, imm_z;
        logic [5:0]  op, fn;
        logic [4:0]  rs, rt, rd, dst;
        bit          use_rs, use_rt, is_beq, is_load, br;
        int          t, tgt;
        ins = imem[pc[7:0]];
        op = ins[31:26]; fn = ins[5:0];
        rs = ins[25:21]; rt = ins[20:16]; rd = ins[15:11];
        imm_s = {{16{ins[15]}}, ins[15:0]};
        imm_z = {16'h0, ins[15:0]};
        a = regs[rs]; b = regs[rt];
        dst = 0; br = 0; tgt = 0; is_load = 0;
        use_rs = (op != 6'b00_0010);
        use_rt = (op == 6'b0) || (op == 6'b10_1011) || (op == 6'b00_0100);
        is_beq = (op == 6'b00_0100);
        case (op)
          6'b00_0000: begin
            if (fn == 6'b10_0000) begin dst = rd; regs[rd] = a + b; end
            if (fn == 6'b10_0010) begin dst = rd; regs[rd] = a - b; end
          end
          6'b00_1101: begin dst = rt; regs[rt] = a | imm_z; end
          6'b10_0011: begin dst = rt; is_load = 1; regs[rt] = dmem[(a + imm_s) >> 2]; end
          6'b10_1011: begin dmem[(a + imm_s) >> 2] = b; written[(a + imm_s) >> 2] = 1; end
          6'b00_0100: if (a == b) begin br = 1; tgt = pc + 1 + int'(imm_s); end
          6'b00_0010: begin br = 1; tgt = int'(ins[25:0]); end
          default: ;
        endcase
        regs[0] = 0;
        // decode-cycle prediction for the pipeline
        t = c_prev + 1;
        if (use_rs && rs != 0) t = max_i(t, wr_cycle[rs] + need(wr_load[rs], is_beq));
        if (use_rt && rt != 0) t = max_i(t, wr_cycle[rt] + need(wr_load[rt], is_beq));
        stall_cycles += t - (c_prev + 1);
        c_prev = t;
        if (dst != 0) begin wr_cycle[dst] = t; wr_load[dst] = is_load; end
        if (br) taken++;
        executed++;
        // next PC
        if (delayed) begin
          nnpc = br ? tgt : npc + 1;
          pc = npc; npc = nnpc;
        end else begin
          pc = br ? tgt : pc + 1;
        end
      end
      id_cycle = c_prev + 1;
    endfunction

    static function int need(bit load, bit beq);
      if (beq) return load ? 3 : 2;
      return load ? 2 : 1;
    endfunction
    static function int max_i(int x, int y);
      return x > y ? x : y;
    endfunction
  endclass

endpackage
