// mux2: two-input word multiplexer, used twice in the datapath. As Mux B it
// picks the ALU's B operand: register port B when MB = 0, the instruction's
// constant when MB = 1. As Mux D it picks the register write-back data: the
// ALU output F when MD = 0, the data RAM output when MD = 1. Combinational.
// Input numbering follows the datapath diagram; the width is a parameter.
module mux2 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             sel,
  input  logic [WIDTH-1:0] in0,
  input  logic [WIDTH-1:0] in1,
  output logic [WIDTH-1:0] out
);

  always_comb out = sel ? in1 : in0;

endmodule
