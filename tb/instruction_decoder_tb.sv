// instruction_decoder_tb: self-checking test of the control unit. It first
// decodes the worked example encodings of the instruction set (ADD, LD, SUB
// with an immediate, BZ +19, JMP -5, BNN -5, a store), with their unused
// opcode bits set both to 0 and to 1, and then random instruction words,
// comparing the control word, constant and PC controls with an expected
// value assembled here field by field from the bit positions.
module instruction_decoder_tb;
  import isa_pkg::*;

  localparam int unsigned W = 16;
  logic [15:0] instr;
  ctrl_t ctrl;
  pc_ctrl_t pcc;
  logic [W-1:0] konst;
  int checks = 0, failures = 0;

  instruction_decoder #(.DATA_W(W)) dut (.instr(instr), .ctrl(ctrl), .constant(konst), .pc_ctrl(pcc));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s instr=%b: got %0d expected %0d", what, instr, got, exp);
    end
  endtask

  // Expected decode: write enable, memory write, mem-to-reg, constant select,
  // jump, branch, and which register fields matter.
  task automatic expect_ctrl(string name, logic [15:0] word, bit e_wr, bit e_mw,
      bit e_md, bit e_mb, bit e_jmp, bit e_br);
    instr = word; #1;
    check({name, " wr"}, ctrl.wr, e_wr);
    check({name, " mw"}, ctrl.mw, e_mw);
    check({name, " md"}, ctrl.md, e_md);
    check({name, " jump"}, pcc.jump, e_jmp);
    check({name, " branch"}, pcc.branch, e_br);
    if (e_wr) check({name, " da"}, ctrl.da, word[8:6]);
    if (!e_jmp) check({name, " aa"}, ctrl.aa, word[5:3]);
    if (e_mw || (e_wr && !e_mb && !e_md)) check({name, " ba"}, ctrl.ba, word[2:0]);
    if (e_wr && !e_md) check({name, " mb"}, ctrl.mb, e_mb);
    if (e_mw) check({name, " mb"}, ctrl.mb, 0);
    if (e_wr && !e_md) check({name, " fs"}, ctrl.fs, word[13:9]);
    if (e_br) check({name, " fs"}, ctrl.fs, 0);
    if (e_br) check({name, " cond"}, pcc.cond, word[11:9]);
    if (e_mb) check({name, " const"}, int'($signed(konst)), int'($signed(word[2:0])));
    if (e_br || e_jmp) check({name, " ad"}, int'($signed(pcc.ad)), int'($signed({word[8:6], word[2:0]})));
  endtask

  initial begin
    for (int x = 0; x < 2; x++) begin
      automatic logic [3:0] dc = x ? 4'hf : 4'h0;
      // ADD R1, R2, R3 -> 0000010 001 010 011
      expect_ctrl("ADD", 16'b0000010_001_010_011, 1, 0, 0, 0, 0, 0);
      // LD R1, (R0) -> 011xxxx 001 000 xxx
      expect_ctrl("LD", {3'b011, dc, 3'b001, 3'b000, dc[2:0]}, 1, 0, 1, 0, 0, 0);
      // SUB R1, R2, #2 -> 1000101 001 010 010
      expect_ctrl("SUB#", 16'b1000101_001_010_010, 1, 0, 0, 1, 0, 0);
      check("SUB# constant", int'(konst), 2);
      // ST (R3), R1 -> 010xxxx xxx 011 001
      expect_ctrl("ST", {3'b010, dc, dc[2:0], 3'b011, 3'b001}, 0, 1, 0, 0, 0, 0);
      // BZ R1, +19 -> 110x011 010 001 011
      expect_ctrl("BZ", {3'b110, dc[0], 3'b011, 3'b010, 3'b001, 3'b011}, 0, 0, 0, 0, 0, 1);
      check("BZ offset", int'($signed(pcc.ad)), 19);
      check("BZ cond", pcc.cond, BR_Z);
      // BNN R3, -5 -> 110x101, AD = 111011
      expect_ctrl("BNN", {3'b110, dc[0], 3'b101, 3'b111, 3'b011, 3'b011}, 0, 0, 0, 0, 0, 1);
      check("BNN offset", int'($signed(pcc.ad)), -5);
      // JMP -5 -> 111xxxx 111 xxx 011
      expect_ctrl("JMP", {3'b111, dc, 3'b111, dc[2:0], 3'b011}, 0, 0, 0, 0, 1, 0);
      check("JMP offset", int'($signed(pcc.ad)), -5);
      // immediate with a negative constant: ADD R7, R6, #-4
      expect_ctrl("ADD#-4", 16'b1000010_111_110_100, 1, 0, 0, 1, 0, 0);
      check("const -4", int'(konst), 16'hfffc);
    end
    repeat (2000) begin
      automatic logic [15:0] w = 16'($urandom);
      case (w[15:13])
        3'b000, 3'b001: expect_ctrl("rand reg", w, 1, 0, 0, 0, 0, 0);
        3'b100, 3'b101: expect_ctrl("rand imm", w, 1, 0, 0, 1, 0, 0);
        3'b010: expect_ctrl("rand st", w, 0, 1, 0, 0, 0, 0);
        3'b011: expect_ctrl("rand ld", w, 1, 0, 1, 0, 0, 0);
        3'b110: expect_ctrl("rand br", w, 0, 0, 0, 0, 0, 1);
        default: expect_ctrl("rand jmp", w, 0, 0, 0, 0, 1, 0);
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
