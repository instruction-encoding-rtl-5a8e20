// cpu_top: single-cycle processor built around the 16-bit instruction
// encoding. Every clock cycle the instruction at the PC is read from the
// instruction memory, decoded into datapath control signals, executed in the
// datapath (register read, Mux B, ALU, data RAM, Mux D, register write), and
// the PC advances by one or by a PC-relative jump/branch offset. One
// instruction therefore completes per cycle.
//
// Interface: hold rst_n low for at least one cycle to clear the registers
// and load the PC from start_pc; the program is written through the imem_*
// port (usually during reset). The pc/instr outputs show the instruction
// executing this cycle, status the ALU status bits, and the wb_* and mem_*
// outputs the register write-back and data-memory write that take effect at
// the next rising edge, for observation.
//
// The datapath wiring and the instruction encoding follow the instruction
// set definition; the single-cycle organisation with a separate instruction
// memory, the widths and the reset are this design's choices.
module cpu_top
  import isa_pkg::*;
#(
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned PC_W    = 16,
  parameter int unsigned DMEM_AW = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PC_W-1:0]    start_pc,
  input  logic               imem_we,
  input  logic [PC_W-1:0]    imem_waddr,
  input  logic [INSTR_W-1:0] imem_wdata,
  output logic [PC_W-1:0]    pc,
  output logic [INSTR_W-1:0] instr,
  output status_t            status,
  output logic               branch_taken,
  output logic               wb_en,
  output logic [2:0]         wb_addr,
  output logic [DATA_W-1:0]  wb_data,
  output logic               mem_we,
  output logic [DATA_W-1:0]  mem_addr,
  output logic [DATA_W-1:0]  mem_wdata
);

  ctrl_t             ctrl;
  pc_ctrl_t          pc_ctrl;
  logic [DATA_W-1:0] constant;
  logic [DATA_W-1:0] a_bus, b_bus, d;

  instruction_memory #(.ADDR_W(PC_W)) u_imem (
    .clk  (clk),
    .we   (imem_we),
    .waddr(imem_waddr),
    .wdata(imem_wdata),
    .raddr(pc),
    .rdata(instr)
  );

  instruction_decoder #(.DATA_W(DATA_W)) u_dec (
    .instr   (instr),
    .ctrl    (ctrl),
    .constant(constant),
    .pc_ctrl (pc_ctrl)
  );

  datapath #(.DATA_W(DATA_W), .DMEM_AW(DMEM_AW)) u_dp (
    .clk     (clk),
    .rst_n   (rst_n),
    .ctrl    (ctrl),
    .constant(constant),
    .status  (status),
    .a_bus   (a_bus),
    .b_bus   (b_bus),
    .f       (),
    .d       (d)
  );

  program_counter #(.PC_W(PC_W)) u_pc (
    .clk     (clk),
    .rst_n   (rst_n),
    .start_pc(start_pc),
    .pc_ctrl (pc_ctrl),
    .status  (status),
    .pc      (pc),
    .taken   (branch_taken)
  );

  assign wb_en     = ctrl.wr;
  assign wb_addr   = ctrl.da;
  assign wb_data   = d;
  assign mem_we    = ctrl.mw;
  assign mem_addr  = a_bus;
  assign mem_wdata = b_bus;

endmodule
