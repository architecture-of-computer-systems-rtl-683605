// ucontroller: the RISC-V microcontroller, version 2 of the lecture.
//
// A microprogram counter (uPC) addresses the control ROM. The ROM word gives
// the datapath its control points and a jump type; the jump logic turns the
// jump type, the ALU's zero? flag and the memory's busy flag into the source
// of the next uPC: uPC+1, uPC (spin), the absolute address of fetch, or the
// dispatch address that the ext block derives from the opcode in IR. The uPC
// is the only state; it resets to the fetch sequence.
//
// Timing: one microinstruction per clock. The ROM and the next-address logic
// are combinational, so the control points of a state are valid for the whole
// cycle in which the uPC holds its address, and the status inputs of that
// cycle decide the next address.
//
// Structure and jump types follow the lecture's controller-2 figure; stall
// (spin while busy) is an output of this design, used to keep the
// datapath's registers from taking the bus while memory has no data yet.
module ucontroller
  import ucode_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] opcode,
  input  logic [2:0] funct3,
  input  logic       zero,
  input  logic       busy,
  output ctrl_t      ctrl,
  output logic       stall,
  output uaddr_t     upc,
  output jump_t      jt
);

  uinst_t   uinst;
  upc_src_t src;
  uaddr_t   dispatch_addr;
  uaddr_t   upc_next;

  control_rom  u_rom  (.upc(upc), .uinst(uinst));
  op_group_ext u_ext  (.opcode(opcode), .funct3(funct3), .target(dispatch_addr), .known());
  jump_logic   u_jump (.jt(uinst.jt), .zero(zero), .busy(busy), .src(src), .stall(stall));

  assign ctrl = uinst.ctrl;
  assign jt   = uinst.jt;

  always_comb begin
    unique case (src)
      SRC_INC:      upc_next = upc + 1'b1;
      SRC_HOLD:     upc_next = upc;
      SRC_ABS:      upc_next = UA_FETCH;
      default:      upc_next = dispatch_addr;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) upc <= UA_FETCH;
    else        upc <= upc_next;
  end

  // Every microinstruction of the program is reachable only below UA_USED.
  a_upc_in_program: assert property (@(posedge clk) disable iff (!rst_n) int'(upc) < UA_USED);

endmodule
