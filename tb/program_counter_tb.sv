// program_counter_tb: self-checking test of the PC. Checks the reset value,
// sequential +1 steps, the PC-relative jump of the worked example (JMP +3 at
// 1002 lands on 1005), a backward jump by -32 and a forward one by +31 (the
// offset limits), and every branch condition code against all sixteen status
// combinations: taken and next PC are compared with the condition table.
module program_counter_tb;
  import isa_pkg::*;

  localparam int unsigned PW = 16;
  logic clk = 0, rst_n = 0, taken;
  logic [PW-1:0] start_pc = 16'd1000, pc;
  pc_ctrl_t pcc = '0;
  status_t st = '0;
  int checks = 0, failures = 0;

  program_counter #(.PC_W(PW)) dut (
    .clk(clk), .rst_n(rst_n), .start_pc(start_pc), .pc_ctrl(pcc), .status(st),
    .pc(pc), .taken(taken));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic bit cond_ref(logic [2:0] c, status_t s);
    case (c)
      3'b000: return s.c;
      3'b001: return s.n;
      3'b010: return s.v;
      3'b011: return s.z;
      3'b100: return !s.c;
      3'b101: return !s.n;
      3'b110: return !s.v;
      default: return !s.z;
    endcase
  endfunction

  task automatic step(pc_ctrl_t c, status_t s, int exp_next, string what);
    pcc = c; st = s; #1;
    @(posedge clk); #1;
    check(what, pc, exp_next);
  endtask

  initial begin
    @(posedge clk); #1;
    rst_n = 1;
    check("reset pc", pc, 1000);
    step('0, '0, 1001, "sequential");
    step('0, '0, 1002, "sequential");
    step('{jump: 1'b1, branch: 1'b0, cond: 3'b0, ad: 6'd3}, '0, 1005, "JMP +3");
    step('{jump: 1'b1, branch: 1'b0, cond: 3'b0, ad: 6'b100000}, '0, 1005 - 32, "JMP -32");
    step('{jump: 1'b1, branch: 1'b0, cond: 3'b0, ad: 6'b011111}, '0, 1005 - 32 + 31, "JMP +31");
    for (int c = 0; c < 8; c++) begin
      for (int s = 0; s < 16; s++) begin
        automatic int pc_before = int'(pc);
        automatic bit exp_t = cond_ref(3'(c), status_t'(s));
        pcc = '{jump: 1'b0, branch: 1'b1, cond: 3'(c), ad: 6'b111011};
        st = status_t'(s); #1;
        check("taken", taken, exp_t);
        @(posedge clk); #1;
        check("branch next pc", pc, exp_t ? pc_before - 5 : pc_before + 1);
      end
    end
    // a condition that holds but no branch: sequential
    step('{jump: 1'b0, branch: 1'b0, cond: 3'b011, ad: 6'd9}, '{v: 0, c: 0, n: 0, z: 1}, pc + 1, "no branch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
