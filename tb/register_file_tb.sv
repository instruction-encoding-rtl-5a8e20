// register_file_tb: self-checking test of the eight-register file. After
// reset every register must read 0 on both ports; then random writes are
// mirrored in a reference array and both read ports are compared with it
// every cycle, including a read of the register being written (old value
// until the clock edge) and cycles with WR = 0 (no change).
module register_file_tb;
  localparam int unsigned W = 16;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [2:0] da = 0, aa = 0, ba = 0;
  logic [W-1:0] d = 0, a, b;
  logic [W-1:0] model [8];
  int checks = 0, failures = 0;

  register_file #(.DATA_W(W), .NREGS(8)) dut (
    .clk(clk), .rst_n(rst_n), .wr(wr), .da(da), .d(d), .aa(aa), .ba(ba), .a(a), .b(b));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    @(posedge clk); #1 rst_n = 1;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 8; i++) begin
      aa = 3'(i); ba = 3'(7 - i); #1;
      check("reset A", a, 0);
      check("reset B", b, 0);
    end
    for (int i = 0; i < 400; i++) begin
      wr = ($urandom_range(3) != 0);
      da = 3'($urandom);
      d  = W'($urandom);
      aa = (i % 5 == 0) ? da : 3'($urandom);
      ba = 3'($urandom);
      #1;
      check("read A", a, model[aa]);
      check("read B", b, model[ba]);
      @(posedge clk);
      if (wr) model[da] = d;
      #1;
      check("after edge A", a, model[aa]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
