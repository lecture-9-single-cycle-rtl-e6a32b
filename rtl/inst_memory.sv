// inst_memory: instruction memory, Instruction = MEM[PC].
//
// The byte address Adr (the PC) selects one of WORDS 32-bit words through
// bits [AW+1:2]; the word is read combinationally, as the single-cycle
// processor fetches and executes within one clock. A program is loaded
// through the write port (prog_we, prog_addr as a word index, prog_data)
// at the rising clock edge, normally while the processor is held in reset.
// The depth and the load port are this design's choices.
module inst_memory #(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic [31:0] adr,
  output logic [31:0] instruction,
  input  logic        prog_we,
  input  logic [31:0] prog_addr,
  input  logic [31:0] prog_data
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr[AW-1:0]] <= prog_data;
  end

  always_comb begin
    instruction = mem[adr[AW+1:2]];
  end
endmodule
