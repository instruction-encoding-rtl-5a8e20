// instruction_memory: program store of 2**ADDR_W 16-bit words, one
// instruction per word, read combinationally at the PC so that fetch, decode
// and execute fit in one cycle. A synchronous write port loads the program
// (for example while the processor is held in reset).
//
// Only "one instruction per 16-bit word" comes from the instruction set; the
// separate instruction store, its size and the load port are this design's
// choices. Contents are undefined until written.
module instruction_memory
  import isa_pkg::*;
#(
  parameter int unsigned ADDR_W = 16
) (
  input  logic               clk,
  input  logic               we,
  input  logic [ADDR_W-1:0]  waddr,
  input  logic [INSTR_W-1:0] wdata,
  input  logic [ADDR_W-1:0]  raddr,
  output logic [INSTR_W-1:0] rdata
);

  logic [INSTR_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
