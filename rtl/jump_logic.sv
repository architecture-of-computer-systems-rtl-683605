// jump_logic: next-microaddress selection of the RISC-V controller V2.
//
// Combinational. From the jump type of the current microinstruction and the
// two status inputs it picks where the uPC goes next:
//   next      uPC + 1
//   spin      busy ? uPC (hold) : uPC + 1
//   fetch     the absolute address of the fetch sequence
//   dispatch  the first state of the instruction's op-group (from ext)
//   ftrue     zero ? absolute : uPC + 1
//   ffalse    zero ? uPC + 1 : absolute
// The six jump types and their rules are the lecture's; the encodings are in
// ucode_pkg. It also reports stall, high while a spin microinstruction waits
// on a busy memory; the datapath uses it to hold its registers.
module jump_logic
  import ucode_pkg::*;
(
  input  jump_t    jt,
  input  logic     zero,
  input  logic     busy,
  output upc_src_t src,
  output logic     stall
);

  always_comb begin
    unique case (jt)
      JT_NEXT:     src = SRC_INC;
      JT_SPIN:     src = busy ? SRC_HOLD : SRC_INC;
      JT_FETCH:    src = SRC_ABS;
      JT_DISPATCH: src = SRC_DISPATCH;
      JT_FTRUE:    src = zero ? SRC_ABS : SRC_INC;
      JT_FFALSE:   src = zero ? SRC_INC : SRC_ABS;
      default:     src = SRC_ABS;
    endcase
  end

  assign stall = (jt == JT_SPIN) && busy;

endmodule
