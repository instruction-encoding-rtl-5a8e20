// program_counter: holds the address of the current instruction and computes
// the next one. Each instruction is one word, so the PC normally advances by
// 1. A jump, or a branch whose condition holds, instead adds the 6-bit
// two's-complement AD offset to the current PC (PC-relative: -32..+31 words
// from the instruction itself). The branch condition is evaluated here from
// the ALU status of the branch's source register.
//
// Condition codes: 000 C, 001 N, 010 V, 011 Z, 100 not C, 101 not N,
// 110 not V, 111 not Z, as in the instruction set. The PC width and the reset
// behaviour (synchronous, active low, PC loaded from start_pc) are this
// design's choices. The PC updates on the rising clock edge; `taken` is
// combinational.
module program_counter
  import isa_pkg::*;
#(
  parameter int unsigned PC_W = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [PC_W-1:0] start_pc,
  input  pc_ctrl_t        pc_ctrl,
  input  status_t         status,
  output logic [PC_W-1:0] pc,
  output logic            taken
);

  logic cond_true;

  always_comb begin
    unique case (pc_ctrl.cond[1:0])
      2'b00:   cond_true = status.c;
      2'b01:   cond_true = status.n;
      2'b10:   cond_true = status.v;
      default: cond_true = status.z;
    endcase
    if (pc_ctrl.cond[2]) cond_true = !cond_true;
  end

  assign taken = pc_ctrl.jump || (pc_ctrl.branch && cond_true);

  always_ff @(posedge clk) begin
    if (!rst_n)     pc <= start_pc;
    else if (taken) pc <= pc + PC_W'($signed(pc_ctrl.ad));
    else            pc <= pc + 1'b1;
  end

endmodule
