// regfile: 32 x 32-bit register file with two read ports and one write port.
//
// Ra and Rb are read combinationally onto busA and busB. When RegWr is high,
// busW is written into register Rw at the rising clock edge. Register 0
// always reads as zero and ignores writes (the MIPS convention; the datapath
// description itself does not say). Reset clears every register.
//
// With BYPASS = 1 a read of the register being written in the same cycle
// returns busW. This models the pipelined design's register file, which is
// written in the first half of a cycle and read in the second half, so an
// instruction in decode sees the value written back in the same cycle.
// A third read port (dbg_ra/dbg_rd) lets a test bench or monitor observe the
// architectural state; it is not part of the processor's datapath.
module regfile #(
  parameter bit BYPASS = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ra,
  input  logic [4:0]  rb,
  output logic [31:0] bus_a,
  output logic [31:0] bus_b,
  input  logic        reg_wr,
  input  logic [4:0]  rw,
  input  logic [31:0] bus_w,
  input  logic [4:0]  dbg_ra,
  output logic [31:0] dbg_rd
);
  logic [31:0] regs [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (reg_wr && rw != 5'd0) begin
      regs[rw] <= bus_w;
    end
  end

  function automatic logic [31:0] rd_port(input logic [4:0] a);
    if (a == 5'd0) return '0;
    if (BYPASS && reg_wr && rw == a) return bus_w;
    return regs[a];
  endfunction

  always_comb begin
    bus_a  = rd_port(ra);
    bus_b  = rd_port(rb);
    dbg_rd = regs[dbg_ra];
  end
endmodule
