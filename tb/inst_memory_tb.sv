// inst_memory_tb: loads random words through the program port and reads
// them back by byte address, as the fetch unit does.
module inst_memory_tb;
  localparam int W = 256;
  logic        clk = 0, prog_we;
  logic [31:0] adr, instruction, prog_addr, prog_data;
  logic [31:0] model [W];
  int checks = 0, failures = 0;

  inst_memory #(.WORDS(W)) dut (.clk, .adr, .instruction, .prog_we, .prog_addr, .prog_data);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    prog_we = 1; adr = 0;
    for (int i = 0; i < W; i++) begin
      @(negedge clk); prog_addr = i; prog_data = $urandom; model[i] = prog_data;
    end
    @(negedge clk); prog_we = 0;
    for (int i = 0; i < 1000; i++) begin
      adr = {22'h0, 8'($urandom), 2'b00};
      #1;
      checks++;
      if (instruction !== model[adr[9:2]]) begin
        failures++;
        $display("FAIL adr=%h got %h exp %h", adr, instruction, model[adr[9:2]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
