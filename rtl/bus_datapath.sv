// bus_datapath: the single-bus datapath of the microcoded RISC-V machine.
//
// All transfers go over one 32-bit bus. Four units can drive it, each through
// its own enable (the tri-state buffers of the figure, modelled here as a
// multiplexer): the immediate selector (enImm), the ALU (enALU), the register
// file (enReg with RegWrt low) and the memory (enMem with MemWrt low, the
// memory's data arriving on mem_rdata). The latches IR, A, B and MA and the
// register file (enReg with RegWrt high) load from the bus at the rising
// edge when their load signal is high. A and B feed the ALU; MA addresses the
// memory; IR supplies the opcode, the register specifiers rd/rs1/rs2 for the
// RegSel multiplexer and the immediates. RegSel picks the register address
// from PC (32), RA (x1), rd, rs2 or rs1. The ALU's zero flag goes to the
// controller. With no driver enabled the bus reads zero.
//
// stall (a spin microinstruction waiting for memory) blocks every register
// load and register-file write for that cycle; the memory keeps its enable.
// That gating, the reset of IR/A/B/MA to zero and the x0/PC addressing are
// this design's choices; units, control points and bus structure are the
// lecture's.
module bus_datapath
  import ucode_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  ctrl_t           ctrl,
  input  logic            stall,
  // memory side
  input  logic [XLEN-1:0] mem_rdata,
  input  logic            mem_drive,   // memory drives the bus this cycle
  output logic [XLEN-1:0] ma,
  output logic [XLEN-1:0] bus,
  // to the controller
  output logic [6:0]      opcode,
  output logic [2:0]      funct3,
  output logic            zero
);

  logic [XLEN-1:0] ir, a, b;
  logic [XLEN-1:0] imm, alu_y, rf_rdata;
  logic [RF_AW-1:0] rf_addr;
  logic             rf_drive, rf_we;

  assign opcode = ir[6:0];
  assign funct3 = ir[9:7];

  imm_select u_imm (.ir(ir), .sel(ctrl.ImmSel), .imm(imm));

  alu u_alu (
    .a(a), .b(b), .op(ctrl.ALUOp), .funct3(ir[9:7]), .alt_r(ir[16]), .alt_i(ir[20]),
    .result(alu_y), .zero(zero)
  );

  always_comb begin
    unique case (ctrl.RegSel)
      RS_PC:   rf_addr = RF_PC;
      RS_RA:   rf_addr = RF_RA;
      RS_RD:   rf_addr = {1'b0, ir[31:27]};
      RS_RS2:  rf_addr = {1'b0, ir[21:17]};
      default: rf_addr = {1'b0, ir[26:22]};
    endcase
  end

  assign rf_drive = ctrl.enReg && !ctrl.RegWrt;
  assign rf_we    = ctrl.enReg && ctrl.RegWrt && !stall;

  gpr_file u_rf (.clk(clk), .rst_n(rst_n), .addr(rf_addr), .we(rf_we), .wdata(bus), .rdata(rf_rdata));

  // The bus: one driver at a time.
  always_comb begin
    bus = '0;
    if (ctrl.enImm)  bus = imm;
    if (ctrl.enALU)  bus = alu_y;
    if (rf_drive)    bus = rf_rdata;
    if (mem_drive)   bus = mem_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir <= '0;
      a  <= '0;
      b  <= '0;
      ma <= '0;
    end else if (!stall) begin
      if (ctrl.ldIR) ir <= bus;
      if (ctrl.ldA)  a  <= bus;
      if (ctrl.ldB)  b  <= bus;
      if (ctrl.ldMA) ma <= bus;
    end
  end

  a_one_bus_driver: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({ctrl.enImm, ctrl.enALU, rf_drive, mem_drive}));

endmodule
