// microcoded_rv32: a microprogrammed RISC-V machine on a single bus.
//
// The controller (ucontroller) steps through a microprogram, one register
// transfer per clock, and drives the control points of the bus datapath
// (bus_datapath); the slow memory (mem_module) holds program and data and
// answers over the same bus, signalling busy until an access completes. The
// opcode in IR and the ALU's zero flag go back to the controller, as does the
// memory's busy flag.
//
// Interface: clk and an active-low asynchronous reset. While in reset the
// memory can be filled through the loader port (ld_en, word address ld_addr,
// ld_data). After reset the machine fetches from byte address 0. upc, ma,
// bus and busy are observation outputs; instr_start is high in the first
// cycle of each instruction fetch and mem_write in the cycle a store to
// memory completes (address on ma, data on bus).
//
// Timing: an instruction takes its microprogram length in cycles plus
// LATENCY-1 extra cycles for every memory access (fetch included).
module microcoded_rv32
  import ucode_pkg::*;
#(
  parameter int unsigned MEM_WORDS   = 1024,
  parameter int unsigned MEM_LATENCY = 3
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         ld_en,
  input  logic [$clog2(MEM_WORDS)-1:0] ld_addr,
  input  logic [XLEN-1:0]              ld_data,
  output logic [UPC_W-1:0]             upc,
  output logic [XLEN-1:0]              ma,
  output logic [XLEN-1:0]              bus,
  output logic                         busy,
  output logic                         instr_start,
  output logic                         mem_write
);

  ctrl_t           ctrl;
  logic            stall, zero, mem_drive;
  logic [6:0]      opcode;
  logic [2:0]      funct3;
  logic [XLEN-1:0] mem_rdata;
  uaddr_t          upc_q;

  ucontroller u_ctrl (
    .clk(clk), .rst_n(rst_n), .opcode(opcode), .funct3(funct3), .zero(zero), .busy(busy),
    .ctrl(ctrl), .stall(stall), .upc(upc_q), .jt()
  );

  bus_datapath u_dp (
    .clk(clk), .rst_n(rst_n), .ctrl(ctrl), .stall(stall), .mem_rdata(mem_rdata),
    .mem_drive(mem_drive), .ma(ma), .bus(bus), .opcode(opcode), .funct3(funct3), .zero(zero)
  );

  mem_module #(.WORDS(MEM_WORDS), .LATENCY(MEM_LATENCY)) u_mem (
    .clk(clk), .rst_n(rst_n), .addr(ma), .enable(ctrl.enMem), .write(ctrl.MemWrt),
    .din(bus), .dout(mem_rdata), .drive(mem_drive), .busy(busy),
    .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data)
  );

  assign upc         = upc_q;
  assign instr_start = (upc_q == UA_FETCH) && rst_n;
  // A store completes at the end of this cycle: MA and the bus show address and data.
  assign mem_write   = ctrl.enMem && ctrl.MemWrt && !busy;

endmodule
