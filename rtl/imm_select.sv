// imm_select: the "Immed Select" box between IR and the bus.
//
// Combinational. ImmSel picks one of four values built from the instruction
// register:
//   IMM_I  sign-extended 12-bit immediate IR[21:10] (ALUi and LW: "B <- Imm")
//   IMM_S  sign-extended split immediate {IR[31:27], IR[16:10]} (SW: "B <- BImm")
//   IMM_B  the split immediate shifted left by one (beq: "B <- BImm << 1")
//   IMM_IR the whole IR (J and JAL: "B <- IR"; the ALU extracts the offset)
// The 2-bit ImmSel, the field positions and BImm = IR[31:27,16:10] follow the
// lecture; which code selects which value is this design's choice.
module imm_select
  import ucode_pkg::*;
(
  input  logic [XLEN-1:0] ir,
  input  immsel_t         sel,
  output logic [XLEN-1:0] imm
);

  logic [11:0] imm_i, imm_s;

  assign imm_i = ir[21:10];
  assign imm_s = {ir[31:27], ir[16:10]};

  always_comb begin
    unique case (sel)
      IMM_I:   imm = {{20{imm_i[11]}}, imm_i};
      IMM_S:   imm = {{20{imm_s[11]}}, imm_s};
      IMM_B:   imm = {{19{imm_s[11]}}, imm_s, 1'b0};
      default: imm = ir;
    endcase
  end

endmodule
