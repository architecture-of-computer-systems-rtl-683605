// gpr_file: the "32 GPRs + PC" register array of the bus-based datapath.
//
// One array of 33 32-bit words, addressed by a 6-bit address: 0..31 are the
// integer registers x0..x31 and 32 is the program counter, so the PC is read
// and written over the bus like any other register. The read is
// combinational (the value is driven onto the bus in the same cycle); a write
// takes the bus value at the rising clock edge. x0 always reads as zero and
// ignores writes. Reset clears every register, so execution starts at
// address 0.
//
// The shared array for GPRs and PC, the 32-bit width and x0 = 0 follow the
// lecture; the PC's address (32), the single port and the reset values are
// this design's choice.
module gpr_file
  import ucode_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RF_AW-1:0] addr,
  input  logic             we,
  input  logic [XLEN-1:0]  wdata,
  output logic [XLEN-1:0]  rdata
);

  localparam int unsigned NREGS = 33;

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && addr != '0 && int'(addr) < NREGS) begin
      regs[addr] <= wdata;
    end
  end

  assign rdata = (int'(addr) < NREGS) ? regs[addr] : '0;

endmodule
