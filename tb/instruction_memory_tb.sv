// instruction_memory_tb: self-checking test of the program store: loads
// random words at random addresses through the write port, then reads every
// loaded address back at the read port, and checks that a read at a
// different address from the one being written is unaffected.
module instruction_memory_tb;
  localparam int unsigned AW = 16;
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] model [logic [AW-1:0]];
  int checks = 0, failures = 0;

  instruction_memory #(.ADDR_W(AW)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s raddr=%h: got %h expected %h", what, raddr, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 200; i++) begin
      we = 1; waddr = AW'($urandom); wdata = 16'($urandom);
      @(posedge clk); #1;
      model[waddr] = wdata;
    end
    we = 0;
    foreach (model[k]) begin
      raddr = k; #1;
      check("read", rdata, model[k]);
    end
    // write one word while reading another one
    foreach (model[k]) begin
      raddr = k; we = 1; waddr = k + 1'b1; wdata = ~model[k];
      if (model.exists(waddr)) continue;
      @(posedge clk); #1;
      check("read during write", rdata, model[k]);
      raddr = waddr; #1;
      check("new word", rdata, ~model[k]);
      break;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
