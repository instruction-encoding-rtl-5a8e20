// datapath: the single-cycle datapath. The register file's port A drives the
// ALU's A input and the data RAM address; Mux B chooses register port B or
// the instruction constant for the ALU's B input and the RAM write data; Mux
// D chooses the ALU output or the RAM output as the value written back to
// register DA. The control word (AA, BA, DA, WR, MB, FS, MW, MD) comes from
// the instruction decoder; the ALU status bits V, C, N, Z go back out.
//
// The wiring is that of the datapath diagram. Everything settles
// combinationally within a cycle; the register file and the RAM are written
// at the next rising clock edge. The data width (16) and RAM size (2**16
// words, addressed by the low DMEM_AW bits of register A) are this design's
// choices. The a_bus, b_bus, f and d outputs expose the internal buses for
// observation.
module datapath
  import isa_pkg::*;
#(
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned DMEM_AW = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ctrl_t             ctrl,
  input  logic [DATA_W-1:0] constant,
  output status_t           status,
  output logic [DATA_W-1:0] a_bus,
  output logic [DATA_W-1:0] b_bus,
  output logic [DATA_W-1:0] f,
  output logic [DATA_W-1:0] d
);

  logic [DATA_W-1:0] reg_b, ram_out;

  register_file #(.DATA_W(DATA_W), .NREGS(8)) u_regs (
    .clk (clk),
    .rst_n(rst_n),
    .wr  (ctrl.wr),
    .da  (ctrl.da),
    .d   (d),
    .aa  (ctrl.aa),
    .ba  (ctrl.ba),
    .a   (a_bus),
    .b   (reg_b)
  );

  mux2 #(.WIDTH(DATA_W)) u_mux_b (
    .sel(ctrl.mb),
    .in0(reg_b),
    .in1(constant),
    .out(b_bus)
  );

  alu #(.DATA_W(DATA_W)) u_alu (
    .a     (a_bus),
    .b     (b_bus),
    .fs    (ctrl.fs),
    .f     (f),
    .status(status)
  );

  data_ram #(.DATA_W(DATA_W), .ADDR_W(DMEM_AW)) u_ram (
    .clk (clk),
    .mw  (ctrl.mw),
    .adrs(a_bus[DMEM_AW-1:0]),
    .data(b_bus),
    .out (ram_out)
  );

  mux2 #(.WIDTH(DATA_W)) u_mux_d (
    .sel(ctrl.md),
    .in0(f),
    .in1(ram_out),
    .out(d)
  );

endmodule
