// data_ram: the datapath's data memory. ADRS is register A, DATA is the
// Mux B output, OUT feeds Mux D. A word is written on the rising clock edge
// when MW = 1; OUT is read combinationally so a load completes within the
// single instruction cycle.
//
// The memory's ports follow the datapath diagram. Its size, word width and
// read timing are not specified; this design uses 2**ADDR_W words of DATA_W
// bits (the low ADDR_W bits of ADRS select the word) and no reset, so
// contents are undefined until written.
module data_ram #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              mw,
  input  logic [ADDR_W-1:0] adrs,
  input  logic [DATA_W-1:0] data,
  output logic [DATA_W-1:0] out
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (mw) mem[adrs] <= data;
  end

  assign out = mem[adrs];

endmodule
