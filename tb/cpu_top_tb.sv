// cpu_top_tb: end-to-end test of the single-cycle processor at its default
// size (16-bit data, 2**16-word instruction and data memories).
//
// The testbench assembles programs with the instruction-format helpers of
// isa_pkg and runs them on the processor and, in lock step, on an
// instruction-set model written here from the encoding rules (fields taken
// straight from the bit positions, ALU results from the FS table). Every
// cycle the PC, the register write-back (enable, register, value) and the
// data-memory write (enable, address, data) are compared with the model.
//
// Phase 1, directed: the PC-relative jump example at address 1000 (with
// constants that fit the 3-bit OP field), a counted loop closed by BNZ,
// store/load, XOR and both shifts, every branch condition on a zero, a
// negative and a positive register, and a forward/backward jump chain
// ending in JMP 0 (halt). The five-instruction example must reach 1007 in
// exactly five cycles (one instruction per cycle), and the whole program
// must reach the halt in the cycle count worked out by hand below.
// Phase 2, random: the whole instruction memory is filled with random valid
// instructions and the processor is run for a few thousand cycles against
// the model. Each mechanism (register ALU, immediate ALU with a negative
// constant, load, store, forward and backward jump, branch taken and not
// taken, every condition code) is counted; one that never happens fails.
module cpu_top_tb;
  import isa_pkg::*;

  localparam int unsigned W = 16;

  logic clk = 0, rst_n = 0;
  logic [15:0] start_pc = 16'd1000;
  logic imem_we = 0;
  logic [15:0] imem_waddr = 0, imem_wdata = 0;
  logic [15:0] pc, instr, wb_data, mem_addr, mem_wdata;
  logic [2:0] wb_addr;
  status_t status;
  logic branch_taken, wb_en, mem_we;

  cpu_top dut (
    .clk(clk), .rst_n(rst_n), .start_pc(start_pc),
    .imem_we(imem_we), .imem_waddr(imem_waddr), .imem_wdata(imem_wdata),
    .pc(pc), .instr(instr), .status(status), .branch_taken(branch_taken),
    .wb_en(wb_en), .wb_addr(wb_addr), .wb_data(wb_data),
    .mem_we(mem_we), .mem_addr(mem_addr), .mem_wdata(mem_wdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycles = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s at pc=%0d instr=%b: got %0d expected %0d", what, pc, instr, got, exp);
    end
  endtask

  // ---------------- assembler helpers ----------------
  logic [15:0] prog [logic [15:0]];
  logic [15:0] here;

  function automatic logic [15:0] i_reg(logic [4:0] fs, int dr, int sa, int sb);
    return enc_reg(op_reg_alu(fs), 3'(dr), 3'(sa), 3'(sb));
  endfunction
  function automatic logic [15:0] i_imm(logic [4:0] fs, int dr, int sa, int k);
    return enc_reg(op_imm_alu(fs), 3'(dr), 3'(sa), 3'(k));
  endfunction
  function automatic logic [15:0] i_ldi(int dr, int k);
    return i_imm(FS_B, dr, 0, k);
  endfunction
  function automatic logic [15:0] i_ld(int dr, int sa);
    return enc_reg(OP_LD, 3'(dr), 3'(sa), 3'd0);
  endfunction
  function automatic logic [15:0] i_st(int sa, int sb);
    return enc_reg(OP_ST, 3'd0, 3'(sa), 3'(sb));
  endfunction
  function automatic logic [15:0] i_jmp(int ad);
    return enc_jb(OP_JMP, 3'd0, 6'(ad));
  endfunction
  function automatic logic [15:0] i_br(int cond, int sa, int ad);
    return enc_jb(op_branch(3'(cond)), 3'(sa), 6'(ad));
  endfunction

  task automatic emit(logic [15:0] w);
    prog[here] = w;
    here++;
  endtask

  task automatic load_program();
    foreach (prog[a]) begin
      imem_we = 1; imem_waddr = a; imem_wdata = prog[a];
      @(posedge clk); #1;
    end
    imem_we = 0;
  endtask

  // ---------------- instruction-set model ----------------
  logic [15:0] m_pc;
  logic [15:0] m_r [8];
  logic [15:0] m_mem [logic [15:0]];

  function automatic logic [15:0] m_alu(logic [4:0] fs, logic [15:0] x, logic [15:0] y);
    case (fs)
      5'b00000, 5'b00111: return x;
      5'b00001: return x + 16'd1;
      5'b00010: return x + y;
      5'b00011: return x + y + 16'd1;
      5'b00100: return x - y - 16'd1;
      5'b00101: return x - y;
      5'b00110: return x - 16'd1;
      5'b01000: return x & y;
      5'b01010: return x | y;
      5'b01100: return x ^ y;
      5'b01110: return ~x;
      5'b10000: return y;
      5'b10100: return y >> 1;
      5'b11000: return y << 1;
      default: begin
        $display("model: FS code %b not in the table", fs);
        return 16'hdead;
      end
    endcase
  endfunction

  // coverage counters
  int n_reg = 0, n_imm = 0, n_imm_neg = 0, n_ld = 0, n_st = 0;
  int n_jf = 0, n_jb = 0, n_bt = 0, n_bn = 0, n_bback = 0;
  int n_cond [8];

  // Compare the processor's visible effects for this cycle with the model,
  // then advance the model by one instruction. Returns 1 on JMP 0.
  task automatic step_and_check(output bit halted);
    logic [15:0] w, a, b, k, res, ad;
    logic [6:0] op;
    bit e_wb, e_mw, tk;
    logic [2:0] e_wa;
    logic [15:0] e_wd, e_ma, e_md;
    halted = 0;
    check("pc", pc, m_pc);
    w = prog.exists(m_pc) ? prog[m_pc] : instr;
    check("instr", instr, w);
    op = w[15:9];
    a  = m_r[w[5:3]];
    b  = m_r[w[2:0]];
    k  = {{13{w[2]}}, w[2:0]};
    ad = {{10{w[8]}}, w[8:6], w[2:0]};
    e_wb = 0; e_mw = 0; e_wa = w[8:6]; e_wd = 0; e_ma = 0; e_md = 0;
    tk = 0;
    case (op[6:5])
      2'b00: begin e_wb = 1; e_wd = m_alu(op[4:0], a, b); n_reg++; end
      2'b10: begin
        e_wb = 1; e_wd = m_alu(op[4:0], a, k); n_imm++;
        if (k[15]) n_imm_neg++;
      end
      2'b01: begin
        if (op[4]) begin
          e_wb = 1; n_ld++;
          if (m_mem.exists(a)) e_wd = m_mem[a];
          else e_wd = wb_data;  // never written: the memory's power-up value
        end else begin
          e_mw = 1; e_ma = a; e_md = b; n_st++;
        end
      end
      default: begin
        if (op[4]) begin
          tk = 1;
          if ($signed(ad) > 0) n_jf++;
          if ($signed(ad) < 0) n_jb++;
          if (ad == 0) halted = 1;
        end else begin
          // status of F = A for the tested register: C = V = 0
          case (op[2:0])
            3'b000: tk = 0;            // C
            3'b001: tk = a[15];        // N
            3'b010: tk = 0;            // V
            3'b011: tk = (a == 0);     // Z
            3'b100: tk = 1;            // not C
            3'b101: tk = !a[15];       // not N
            3'b110: tk = 1;            // not V
            default: tk = (a != 0);    // not Z
          endcase
          n_cond[op[2:0]]++;
          if (tk) n_bt++; else n_bn++;
          if (tk && $signed(ad) < 0) n_bback++;
        end
      end
    endcase
    check("wb_en", wb_en, e_wb);
    if (e_wb) begin
      check("wb_addr", wb_addr, e_wa);
      check("wb_data", wb_data, e_wd);
    end
    check("mem_we", mem_we, e_mw);
    if (e_mw) begin
      check("mem_addr", mem_addr, e_ma);
      check("mem_wdata", mem_wdata, e_md);
    end
    check("taken", branch_taken, tk);
    // advance the model
    if (e_wb) m_r[e_wa] = e_wd;
    if (e_mw) m_mem[e_ma] = e_md;
    m_pc = tk ? m_pc + ad : m_pc + 16'd1;
  endtask

  task automatic reset_cpu(logic [15:0] spc);
    rst_n = 0; start_pc = spc;
    @(posedge clk); #1;
    @(posedge clk); #1;
    rst_n = 1;
    m_pc = spc;
    foreach (m_r[i]) m_r[i] = '0;
  endtask

  // Run until JMP 0 or max_cycles; returns the number of cycles taken.
  task automatic run(int max_cycles, output int n);
    bit h;
    n = 0;
    do begin
      step_and_check(h);
      @(posedge clk); #1;
      n++;
    end while (!h && n < max_cycles);
  endtask

  // ---------------- test ----------------
  int n, expect_cycles;
  int regs_for_branch [3] = '{2, 3, 5};

  initial begin
    foreach (n_cond[i]) n_cond[i] = 0;

    // ---- phase 1: directed program at 1000 ----
    here = 16'd1000;
    emit(i_ldi(1, 1));                   // 1000 LD  R1, #1
    emit(i_ldi(2, 3));                   // 1001 LD  R2, #3
    emit(i_jmp(3));                      // 1002 JMP +3
    emit(i_ldi(1, 2));                   // 1003 LD  R1, #2   (skipped)
    emit(i_ldi(2, -4));                  // 1004 LD  R2, #-4  (skipped)
    emit(i_reg(FS_ADD, 3, 3, 2));        // 1005 ADD R3, R3, R2
    emit(i_st(1, 3));                    // 1006 ST  (R1), R3
    emit(i_ldi(4, 3));                   // 1007 LD  R4, #3
    emit(i_ldi(5, 0));                   // 1008 LD  R5, #0
    emit(i_reg(FS_ADD, 5, 5, 4));        // 1009 ADD R5, R5, R4
    emit(i_imm(FS_SUB, 4, 4, 1));        // 1010 SUB R4, R4, #1
    emit(i_br(BR_NZ, 4, -2));            // 1011 BNZ R4, -2
    emit(i_st(1, 5));                    // 1012 ST  (R1), R5
    emit(i_ld(6, 1));                    // 1013 LD  R6, (R1)
    emit(i_reg(FS_XOR, 7, 6, 3));        // 1014 XOR R7, R6, R3
    emit(i_reg(FS_SL, 0, 0, 7));         // 1015 SL  R0, R7
    emit(i_imm(FS_SR, 1, 0, -4));        // 1016 SR  R1, #-4
    emit(i_ldi(2, 0));                   // 1017 LD  R2, #0
    emit(i_ldi(3, -1));                  // 1018 LD  R3, #-1
    for (int c = 0; c < 8; c++)          // 1019..1066
      foreach (regs_for_branch[j]) begin
        emit(i_br(c, regs_for_branch[j], 2));
        emit(i_ldi(7, 1));
      end
    emit(i_jmp(2));                      // 1067 JMP +2
    emit(i_jmp(3));                      // 1068 JMP +3
    emit(i_ldi(7, 3));                   // 1069 LD  R7, #3
    emit(i_jmp(-2));                     // 1070 JMP -2
    emit(i_jmp(0));                      // 1071 JMP 0 (halt)

    load_program();
    reset_cpu(16'd1000);

    // The jump example: 1000, 1001, 1002, 1005, 1006 -> at 1007 after 5 cycles.
    run(5, n);
    check("example reaches 1007 in 5 cycles", pc, 1007);
    check("R3 after example", dut.u_dp.u_regs.regs[3], 3);

    // Rest by hand: 2 (1007-1008) + 3 iterations x 3 (1009-1011) + 7
    // (1012-1018) + branches: per condition on R2=0, R3=-1, R5=6, one or two
    // instructions each (taken skips the LD) + 1067, 1069, 1070, 1068, 1071.
    // Taken counts per condition: C 0, N 1, V 0, Z 1, NC 3, NN 2, NV 3, NZ 2
    // -> 24 branches + (24 - 12) fall-through loads = 36.
    expect_cycles = 2 + 9 + 7 + 36 + 5;
    run(1000, n);
    check("directed program cycles", n, expect_cycles);
    check("R0 = (6 ^ 3) << 1", dut.u_dp.u_regs.regs[0], 10);
    check("R1 = 0xfffc >> 1", dut.u_dp.u_regs.regs[1], 16'h7ffe);
    check("M[1] = 3+2+1", dut.u_dp.u_ram.mem[1], 6);

    // ---- phase 2: random programs over the whole instruction memory ----
    prog.delete();
    for (int a = 0; a < 65536; a++) begin
      automatic logic [15:0] w = 16'($urandom);
      automatic logic [4:0] fs_list [15] = '{5'b00000, 5'b00001, 5'b00010, 5'b00011, 5'b00100,
                                   5'b00101, 5'b00110, 5'b00111, 5'b01000, 5'b01010,
                                   5'b01100, 5'b01110, 5'b10000, 5'b10100, 5'b11000};
      // keep most instructions in the ALU / memory groups so loops are rare
      if (w[15:14] == 2'b11 && $urandom_range(3) != 0) w[15] = 1'b0;
      if (w[15:14] == 2'b00 || w[15:14] == 2'b10) w[13:9] = fs_list[$urandom_range(14)];
      prog[16'(a)] = w;
    end
    load_program();
    for (int t = 0; t < 4; t++) begin
      reset_cpu(16'($urandom));
      m_mem.delete();
      run(3000, n);
    end

    // ---- coverage of the mechanisms ----
    begin
      automatic string names [9] = '{"register ALU", "immediate ALU", "negative constant", "load",
                           "store", "forward jump", "backward jump", "branch taken",
                           "branch not taken"};
      int counts [9];
      counts = '{n_reg, n_imm, n_imm_neg, n_ld, n_st, n_jf, n_jb, n_bt, n_bn};
      foreach (counts[i]) begin
        $display("  %-18s %0d", names[i], counts[i]);
        check({"happened: ", names[i]}, counts[i] > 0, 1);
      end
      foreach (n_cond[c]) begin
        $display("  branch cond %b     %0d", 3'(c), n_cond[c]);
        check("branch condition used", n_cond[c] > 0, 1);
      end
      check("backward branch taken", n_bback > 0, 1);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
