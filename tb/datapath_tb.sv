// datapath_tb: self-checking test of the datapath driven by raw control
// words, as the decoder would drive it. A reference model of the eight
// registers and the memory is updated alongside. Each cycle is one of:
// register ALU operation (MB = 0), immediate ALU operation (MB = 1, random
// constant), store (MW = 1, address from port A, data from Mux B) or load
// (MD = 1). The write-back value D, the ALU output F and the status bits are
// checked against the model before every clock edge.
module datapath_tb;
  import isa_pkg::*;

  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0;
  ctrl_t ctrl = '0;
  logic [W-1:0] konst = 0, a_bus, b_bus, f, d;
  status_t st;
  logic [W-1:0] regs [8];
  logic [W-1:0] mem [logic [W-1:0]];
  int checks = 0, failures = 0;
  int n_reg = 0, n_imm = 0, n_ld = 0, n_st = 0;

  datapath #(.DATA_W(W), .DMEM_AW(16)) dut (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl), .constant(konst), .status(st),
    .a_bus(a_bus), .b_bus(b_bus), .f(f), .d(d));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (ctrl=%p)", what, got, exp, ctrl);
    end
  endtask

  function automatic logic [W-1:0] ref_f(logic [4:0] code, logic [W-1:0] x, logic [W-1:0] y);
    case (code)
      5'b00010: return W'(x + y);
      5'b00101: return W'(x - y);
      5'b01000: return x & y;
      5'b01010: return x | y;
      5'b01100: return x ^ y;
      5'b10000: return y;
      5'b10100: return y >> 1;
      default:  return y << 1;  // 11000
    endcase
  endfunction

  logic [4:0] codes [8] = '{5'b00010, 5'b00101, 5'b01000, 5'b01010, 5'b01100,
                            5'b10000, 5'b10100, 5'b11000};

  initial begin
    @(posedge clk); #1 rst_n = 1;
    foreach (regs[i]) regs[i] = '0;
    for (int i = 0; i < 1500; i++) begin
      automatic int kind = (i < 16) ? 1 : $urandom_range(3);
      automatic logic [W-1:0] bop, exp;
      ctrl = '0;
      ctrl.aa = 3'($urandom); ctrl.ba = 3'($urandom); ctrl.da = 3'($urandom);
      konst = W'($urandom);
      if (kind == 3) begin
        // load: pick a register that holds an address already written
        automatic int k = -1;
        for (int r = 0; r < 8; r++) if (mem.exists(regs[r])) k = r;
        if (k < 0) kind = 2; else ctrl.aa = 3'(k);
      end
      case (kind)
        0, 1: begin
          ctrl.mb = (kind == 1); ctrl.wr = 1;
          ctrl.fs = (i < 16) ? 5'b10000 : codes[$urandom_range(7)];
          bop = ctrl.mb ? konst : regs[ctrl.ba];
          exp = ref_f(ctrl.fs, regs[ctrl.aa], bop);
          #1;
          check("F", f, exp);
          check("D", d, exp);
          check("Z", W'(st.z), W'(exp == 0));
          check("N", W'(st.n), W'(exp[W-1]));
          if (kind == 0) n_reg++; else n_imm++;
        end
        2: begin
          ctrl.mw = 1; ctrl.mb = 1'($urandom_range(1));
          bop = ctrl.mb ? konst : regs[ctrl.ba];
          #1;
          check("ADRS", a_bus, regs[ctrl.aa]);
          check("DATA", b_bus, bop);
          n_st++;
        end
        default: begin
          ctrl.md = 1; ctrl.wr = 1;
          exp = mem[regs[ctrl.aa]];
          #1;
          check("load D", d, exp);
          n_ld++;
        end
      endcase
      @(posedge clk);
      if (ctrl.wr) regs[ctrl.da] = ctrl.md ? mem[regs[ctrl.aa]] : ref_f(ctrl.fs, regs[ctrl.aa], ctrl.mb ? konst : regs[ctrl.ba]);
      if (ctrl.mw) mem[regs[ctrl.aa]] = ctrl.mb ? konst : regs[ctrl.ba];
      #1;
    end
    checks++;
    if (n_reg == 0 || n_imm == 0 || n_ld == 0 || n_st == 0) begin
      failures++;
      $display("FAIL coverage reg=%0d imm=%0d ld=%0d st=%0d", n_reg, n_imm, n_ld, n_st);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
