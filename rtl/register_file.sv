// register_file: eight general registers R0..R7 with two combinational read
// ports (A at address AA, B at address BA) and one write port D at address
// DA, written on the rising clock edge when WR = 1.
//
// Eight registers follow from the 3-bit register fields of the instruction
// formats. All registers, R0 included, are ordinary read/write registers.
// Reads are asynchronous so an instruction reads its operands and writes its
// result in the same cycle; a read of the register being written returns the
// old value. A synchronous active-low reset clears every register (the reset
// and the data width are this design's choices).
module register_file
  import isa_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned NREGS  = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      wr,
  input  logic [$clog2(NREGS)-1:0]  da,
  input  logic [DATA_W-1:0]         d,
  input  logic [$clog2(NREGS)-1:0]  aa,
  input  logic [$clog2(NREGS)-1:0]  ba,
  output logic [DATA_W-1:0]         a,
  output logic [DATA_W-1:0]         b
);

  logic [DATA_W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (wr) begin
      regs[da] <= d;
    end
  end

  assign a = regs[aa];
  assign b = regs[ba];

endmodule
