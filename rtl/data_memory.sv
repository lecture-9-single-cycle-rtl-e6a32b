// data_memory: word-organised data memory of the MIPS-lite processors.
//
// Adr is a byte address; bits [AW+1:2] select one of WORDS 32-bit words
// (the two low bits are ignored, only aligned word accesses exist).
// Reading is combinational, so a load finishes within its cycle; when WrEn
// is high, DataIn is written at the rising clock edge. The depth and the
// word-only organisation are this design's choices. A second read port
// (dbg_addr/dbg_data) lets a test bench observe memory contents. Contents
// are not reset.
module data_memory #(
  parameter int unsigned WORDS = 256
) (
  input  logic        clk,
  input  logic        wr_en,
  input  logic [31:0] adr,
  input  logic [31:0] data_in,
  output logic [31:0] data_out,
  input  logic [31:0] dbg_addr,
  output logic [31:0] dbg_data
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[adr[AW+1:2]] <= data_in;
  end

  always_comb begin
    data_out = mem[adr[AW+1:2]];
    dbg_data = mem[dbg_addr[AW+1:2]];
  end
endmodule
