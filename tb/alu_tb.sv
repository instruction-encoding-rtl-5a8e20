// alu_tb: self-checking test of the function unit. Every code of the FS
// table is applied to directed corner operands and to random ones; F is
// compared with the table's formula evaluated in integer arithmetic, N and Z
// with the sign and zero of the expected F, and C and V of add and subtract
// with the unsigned carry / signed overflow of the exact sum.
module alu_tb;
  import isa_pkg::*;

  localparam int unsigned W = 16;

  logic [W-1:0] a, b, f;
  logic [FS_W-1:0] fs;
  status_t st;
  int checks = 0, failures = 0;

  alu #(.DATA_W(W)) dut (.a(a), .b(b), .fs(fs), .f(f), .status(st));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] ref_f(logic [4:0] code, logic [W-1:0] x, logic [W-1:0] y);
    case (code)
      5'b00000: return x;
      5'b00001: return W'(x + 1);
      5'b00010: return W'(x + y);
      5'b00011: return W'(x + y + 1);
      5'b00100: return W'(x - y - 1);   // A + B' = A - B - 1
      5'b00101: return W'(x - y);
      5'b00110: return W'(x - 1);
      5'b00111: return x;
      5'b01000: return x & y;
      5'b01010: return x | y;
      5'b01100: return x ^ y;
      5'b01110: return ~x;
      5'b10000: return y;
      5'b10100: return y >> 1;
      5'b11000: return y << 1;
      default:  return 'x;
    endcase
  endfunction

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s fs=%b a=%h b=%h: got %h expected %h", what, fs, a, b, got, exp);
    end
  endtask

  logic [4:0] codes [15] = '{5'b00000, 5'b00001, 5'b00010, 5'b00011, 5'b00100,
                             5'b00101, 5'b00110, 5'b00111, 5'b01000, 5'b01010,
                             5'b01100, 5'b01110, 5'b10000, 5'b10100, 5'b11000};
  logic [W-1:0] corner [6] = '{16'h0000, 16'h0001, 16'h7fff, 16'h8000, 16'hffff, 16'h1234};

  task automatic apply(logic [4:0] code, logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] e;
    longint sx, sy, sum;
    fs = code; a = x; b = y;
    #1;
    e = ref_f(code, x, y);
    check("F", f, e);
    check("N", W'(st.n), W'(e[W-1]));
    check("Z", W'(st.z), W'(e == 0));
    sx = longint'($signed(x)); sy = longint'($signed(y));
    if (code == 5'b00010) begin
      check("C add", W'(st.c), W'((int'(x) + int'(y)) >= (1 << W)));
      sum = sx + sy;
      check("V add", W'(st.v), W'(sum > 32767 || sum < -32768));
    end
    if (code == 5'b00101) begin
      check("C sub", W'(st.c), W'(x >= y));
      sum = sx - sy;
      check("V sub", W'(st.v), W'(sum > 32767 || sum < -32768));
    end
    if (code[4:3] != 2'b00) begin
      check("C logic", W'(st.c), '0);
      check("V logic", W'(st.v), '0);
    end
  endtask

  initial begin
    foreach (codes[i])
      foreach (corner[j])
        foreach (corner[k])
          apply(codes[i], corner[j], corner[k]);
    repeat (3000) apply(codes[$urandom_range(14)], W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
