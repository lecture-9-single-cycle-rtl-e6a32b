// data_memory_tb: writes random words to random aligned addresses and reads
// them back on both read ports; checks that a write happens only at the
// clock edge and only with WrEn.
module data_memory_tb;
  localparam int W = 64;
  logic        clk = 0, wr_en;
  logic [31:0] adr, data_in, data_out, dbg_addr, dbg_data;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  data_memory #(.WORDS(W)) dut (.clk, .wr_en, .adr, .data_in, .data_out, .dbg_addr, .dbg_data);

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
    wr_en = 1; dbg_addr = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); adr = 32'(i * 4); data_in = $urandom; model[i] = data_in;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      wr_en = $urandom % 2;
      adr = {24'h0, 6'($urandom), 2'b00};
      dbg_addr = {24'h0, 6'($urandom), 2'b00};
      data_in = $urandom;
      #1;
      chk(data_out, model[adr[7:2]], "read before edge");
      chk(dbg_data, model[dbg_addr[7:2]], "dbg read");
      @(posedge clk);
      if (wr_en) model[adr[7:2]] = data_in;
      #1;
      chk(data_out, model[adr[7:2]], "read after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
