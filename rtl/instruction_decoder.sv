// instruction_decoder: the control unit of the single-cycle processor. It
// splits a 16-bit instruction into its fields and produces the datapath
// control word, the sign-extended constant, and the PC controls. Purely
// combinational.
//
// Fields and opcodes follow the instruction set: opcode = bits 15-9, DR =
// 8-6, SA = 5-3, SB or OP = 2-0, AD = {bits 8-6, bits 2-0}. Opcode bits 6-5
// give the category:
//   00 register ALU:   R[DR] <- R[SA] op R[SB], FS = opcode bits 4-0
//   01 load/store:     bit 4 = 1 LD R[DR] <- M[R[SA]];
//                      bit 4 = 0 ST M[R[SA]] <- R[SB]
//   10 immediate ALU:  R[DR] <- R[SA] op sext(OP), FS = opcode bits 4-0
//                      (an immediate load is FS = 10000, F = B)
//   11 jump/branch:    bit 4 = 1 JMP, PC <- PC + sext(AD);
//                      bit 4 = 0 branch on condition opcode bits 2-0,
//                      tested on R[SA]; bit 3 unused
// The translation of each category into control signals is this design's
// reading of the datapath: for ST, SA holds the address and SB the data; a
// branch passes R[SA] through the ALU with FS = 00000 (F = A) so that the
// status bits describe R[SA]. Opcode bits the set leaves unused are ignored.
// Most outputs are instruction bits routed straight through (register
// addresses, FS, condition, offset): the uniform layout keeps this unit small.
module instruction_decoder
  import isa_pkg::*;
#(
  parameter int unsigned DATA_W = 16
) (
  input  logic [INSTR_W-1:0] instr,
  output ctrl_t              ctrl,
  output logic [DATA_W-1:0]  constant,
  output pc_ctrl_t           pc_ctrl
);

  instr_t    in;
  category_e cat;

  assign in  = instr_t'(instr);
  assign cat = category_e'(in.opcode[6:5]);

  // 3-bit OP operand, sign-extended to the datapath width.
  assign constant = {{(DATA_W-3){in.sb[2]}}, in.sb};

  always_comb begin
    ctrl    = '0;
    ctrl.da = in.dr;
    ctrl.aa = in.sa;
    ctrl.ba = in.sb;
    ctrl.fs = in.opcode[4:0];

    pc_ctrl        = '0;
    pc_ctrl.ad     = {in.dr, in.sb};
    pc_ctrl.cond   = in.opcode[2:0];

    unique case (cat)
      CAT_REG_ALU: begin
        ctrl.wr = 1'b1;
      end
      CAT_IMM_ALU: begin
        ctrl.mb = 1'b1;
        ctrl.wr = 1'b1;
      end
      CAT_MEM: begin
        ctrl.fs = FS_A;
        if (in.opcode[4]) begin
          ctrl.md = 1'b1;
          ctrl.wr = 1'b1;
        end else begin
          ctrl.mw = 1'b1;
        end
      end
      default: begin  // CAT_JUMP_BR
        ctrl.fs = FS_A;
        if (in.opcode[4]) pc_ctrl.jump = 1'b1;
        else              pc_ctrl.branch = 1'b1;
      end
    endcase
  end

  // One instruction never writes both a register and the data RAM, and never
  // both jumps and branches.
  always_comb begin
    assert (!(ctrl.wr && ctrl.mw)) else $error("decoder: WR and MW both set");
    assert (!(pc_ctrl.jump && pc_ctrl.branch)) else $error("decoder: jump and branch both set");
  end

endmodule
