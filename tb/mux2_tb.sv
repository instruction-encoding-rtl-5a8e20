// mux2_tb: self-checking test of the two-input multiplexer used as Mux B and
// Mux D: random inputs with both select values, output compared with the
// selected input.
module mux2_tb;
  localparam int unsigned W = 16;
  logic sel;
  logic [W-1:0] in0, in1, out;
  int checks = 0, failures = 0;

  mux2 #(.WIDTH(W)) dut (.sel(sel), .in0(in0), .in1(in1), .out(out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      in0 = W'($urandom);
      in1 = ~in0 ^ W'($urandom_range(1, 65535));
      sel = i[0];
      #1;
      checks++;
      if (out !== (sel ? in1 : in0)) begin
        failures++;
        $display("FAIL sel=%b in0=%h in1=%h out=%h", sel, in0, in1, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
