// data_ram_tb: self-checking test of the data memory. Writes random words to
// random addresses (MW = 1), mirrors them in an associative array, and reads
// addresses back with MW = 0, checking that OUT shows the last word written
// and that a cycle with MW = 0 changes nothing.
module data_ram_tb;
  localparam int unsigned W = 16, AW = 16;
  logic clk = 0, mw = 0;
  logic [AW-1:0] adrs = 0;
  logic [W-1:0] data = 0, out;
  logic [W-1:0] model [logic [AW-1:0]];
  logic [AW-1:0] addrs [$];
  int checks = 0, failures = 0;

  data_ram #(.DATA_W(W), .ADDR_W(AW)) dut (
    .clk(clk), .mw(mw), .adrs(adrs), .data(data), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s adrs=%h: got %h expected %h", what, adrs, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 300; i++) begin
      mw   = 1;
      adrs = (i < 150 || addrs.size() == 0) ? AW'($urandom) : addrs[$urandom_range(addrs.size() - 1)];
      data = W'($urandom);
      @(posedge clk); #1;
      if (!model.exists(adrs)) addrs.push_back(adrs);
      model[adrs] = data;
      check("write-through read", out, data);
    end
    mw = 0;
    foreach (addrs[i]) begin
      adrs = addrs[i];
      data = ~model[adrs];
      @(posedge clk); #1;
      check("read back", out, model[adrs]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
