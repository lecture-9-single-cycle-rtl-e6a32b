// regfile_tb: random reads and writes against a reference array, for the
// plain register file and the write-then-read (bypass) variant. Checks that
// register 0 stays zero, that a write appears at the next edge, and that the
// bypass variant returns busW during the writing cycle.
module regfile_tb;
  logic        clk = 0, rst_n = 0;
  logic [4:0]  ra, rb, rw, dbg_ra;
  logic        reg_wr;
  logic [31:0] bus_w;
  logic [31:0] a0, b0, d0, a1, b1, d1;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  regfile #(.BYPASS(1'b0)) dut0 (.clk, .rst_n, .ra, .rb, .bus_a(a0), .bus_b(b0),
                                 .reg_wr, .rw, .bus_w, .dbg_ra, .dbg_rd(d0));
  regfile #(.BYPASS(1'b1)) dut1 (.clk, .rst_n, .ra, .rb, .bus_a(a1), .bus_b(b1),
                                 .reg_wr, .rw, .bus_w, .dbg_ra, .dbg_rd(d1));

  always #5 clk = ~clk;

  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    reg_wr = 0; ra = 0; rb = 0; rw = 0; bus_w = 0; dbg_ra = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ra = 5'($urandom); rb = 5'($urandom); dbg_ra = 5'($urandom);
      reg_wr = ($urandom % 3) != 0;
      rw = ($urandom % 4 == 0) ? ra : 5'($urandom);
      bus_w = $urandom;
      #1;
      chk(a0, model[ra], "busA");
      chk(b0, model[rb], "busB");
      chk(d0, model[dbg_ra], "dbg");
      chk(a1, (reg_wr && rw == ra && ra != 0) ? bus_w : model[ra], "bypass busA");
      chk(b1, (reg_wr && rw == rb && rb != 0) ? bus_w : model[rb], "bypass busB");
      @(posedge clk);
      if (reg_wr && rw != 0) model[rw] = bus_w;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
