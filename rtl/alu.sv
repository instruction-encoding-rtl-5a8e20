// alu: the datapath's function unit. Computes F from operands A and B as
// selected by the 5-bit function code FS, plus the status bits V (signed
// overflow), C (carry out), N (F negative) and Z (F zero). Purely
// combinational.
//
// The FS table is the instruction set's: 00000..00111 are arithmetic,
// 01000/01010/01100/01110 are AND, OR, XOR and NOT A, 10000/10100/11000 are
// transfer B, shift B right and shift B left. How the unit is built is this
// design's choice: the arithmetic codes share one adder F = A + Y + FS[0],
// with Y = 0, B, B' or all ones picked by FS[2:1]; this reproduces every
// arithmetic row of the table (00110 gives A - 1, 00111 gives A with C = 1).
// Logic codes ignore FS[0] and shift codes ignore FS[1:0]; FS[3:2] = 11 in
// the shift group transfers B. Shifts move one place and fill with 0.
// C and V are those of the adder for arithmetic codes and 0 otherwise.
module alu
  import isa_pkg::*;
#(
  parameter int unsigned DATA_W = 16
) (
  input  logic [DATA_W-1:0] a,
  input  logic [DATA_W-1:0] b,
  input  logic [FS_W-1:0]   fs,
  output logic [DATA_W-1:0] f,
  output status_t           status
);

  logic [DATA_W-1:0] y;
  logic [DATA_W:0]   sum;
  logic              carry, ovf;

  always_comb begin
    unique case (fs[2:1])
      2'b00: y = '0;
      2'b01: y = b;
      2'b10: y = ~b;
      default: y = '1;
    endcase
    sum = {1'b0, a} + {1'b0, y} + {{DATA_W{1'b0}}, fs[0]};
  end

  always_comb begin
    carry = 1'b0;
    ovf   = 1'b0;
    if (fs[4]) begin
      unique case (fs[3:2])
        2'b01:   f = {1'b0, b[DATA_W-1:1]};
        2'b10:   f = {b[DATA_W-2:0], 1'b0};
        default: f = b;
      endcase
    end else if (fs[3]) begin
      unique case (fs[2:1])
        2'b00:   f = a & b;
        2'b01:   f = a | b;
        2'b10:   f = a ^ b;
        default: f = ~a;
      endcase
    end else begin
      f     = sum[DATA_W-1:0];
      carry = sum[DATA_W];
      ovf   = (a[DATA_W-1] == y[DATA_W-1]) && (f[DATA_W-1] != a[DATA_W-1]);
    end
  end

  assign status.v = ovf;
  assign status.c = carry;
  assign status.n = f[DATA_W-1];
  assign status.z = (f == '0);

endmodule
