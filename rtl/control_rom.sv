// control_rom: the microprogram of the RISC-V controller V2.
//
// A read-only store addressed by the uPC alone (the opcode reaches the uPC
// only through dispatch, the status bits only through the jump logic). Each
// word holds the control points of one register transfer on the bus plus the
// jump type that chooses the next microaddress. The store is combinational:
// the word for the current uPC drives the datapath in the same cycle.
//
// Contents (one line per state, "dst <- src  jump"):
//   fetch   MA,A <- PC; IR <- Mem spin; PC <- A+4 dispatch
//   ALU     A <- rs1; B <- rs2; rd <- func(A,B) fetch
//   ALUi    A <- rs1; B <- Imm; rd <- Op(A,B) fetch
//   LW      A <- rs1; B <- Imm; MA <- A+B; rd <- Mem spin; fetch
//   SW      A <- rs1; B <- BImm; MA <- A+B; Mem <- rs2 spin; fetch
//   beq     A <- rs1; B <- rs2; A <- PC ffalse (ALU: A-B); A <- A-4;
//           B <- BImm<<1; PC <- A+B fetch
//   J       A <- PC; A <- A-4; B <- IR; PC <- JumpTarg(A,B) fetch
//   JR      A <- rs1; PC <- A fetch
//   JAL     A <- PC; x1 <- A; A <- A-4; B <- IR; PC <- JumpTarg(A,B) fetch
//   JALR    A <- PC; B <- rs1; x1 <- A; PC <- B fetch
//   ALUMM   MA <- rs1; A <- Mem spin; MA <- rs2; B <- Mem spin; MA <- rd;
//           Mem <- func(A,B) spin; fetch
// These sequences are the lecture's controller-2 tables, with three
// departures: J starts with "A <- PC" (the table's "A <- A-4" alone would
// leave A at the jump's address minus 4, not the jump's address, since A
// still holds the old PC after fetch), the beq states are numbered 0..5
// without a repeated label, and JALR, whose microcode the lecture leaves out,
// is this design's own sequence. Unused addresses hold a no-op that returns
// to fetch.
module control_rom
  import ucode_pkg::*;
(
  input  uaddr_t upc,
  output uinst_t uinst
);

  ctrl_t c;
  jump_t j;

  always_comb begin
    c = CTRL_NOP;
    j = JT_FETCH;
    unique case (upc)
      // ---------------- instruction fetch
      UA_FETCH + 6'd0: begin c.RegSel = RS_PC; c.enReg = 1'b1; c.ldMA = 1'b1; c.ldA = 1'b1; j = JT_NEXT; end
      UA_FETCH + 6'd1: begin c.enMem = 1'b1; c.ldIR = 1'b1; j = JT_SPIN; end
      UA_FETCH + 6'd2: begin c.ALUOp = ALU_INC4; c.enALU = 1'b1; c.RegSel = RS_PC; c.enReg = 1'b1; c.RegWrt = 1'b1; j = JT_DISPATCH; end
      // ---------------- register-register ALU
      UA_ALU + 6'd0: begin c.RegSel = RS_RS1; c.enReg = 1'b1; c.ldA = 1'b1; j = JT_NEXT; end
      UA_ALU + 6'd1: begin c.RegSel = RS_RS2; c.enReg = 1'b1; c.ldB = 1'b1; j = JT_NEXT; end
      UA_ALU + 6'd2: begin c.ALUOp = ALU_FUNC_R; c.enALU = 1'b1; c.RegSel = RS_RD; c.enReg = 1'b1; c.RegWrt = 1'b1; j = JT_FETCH; end
      // ---------------- register-immediate ALU
      UA_ALUI + 6'd0: begin c.RegSel = RS_RS1; c.enReg = 1'b1; c.ldA = 1'b1; j = JT_NEXT; end
      UA_ALUI + 6'd1: begin c.ImmSel = IMM_I; c.enImm = 1'b1; c.ldB = 1'b1; j = JT_NEXT; end
      UA_ALUI + 6'd2: begin c.ALUOp = ALU_FUNC_I; c.enALU = 1'b1; c.RegSel = RS_RD; c.enReg = 1'b1; c.RegWrt = 1'b1; j = JT_FETCH; end
      // ---------------- load word
      UA_LW + 6'd0: begin c.RegSel = RS_RS1; c.enReg = 1'b1; c.ldA = 1'b1; j = JT_NEXT; end
      UA_LW + 6'd1: begin c.ImmSel = IMM_I; c.enImm = 1'b1; c.ldB = 1'b1; j = JT_NEXT; end
      UA_LW + 6'd2: begin c.ALUOp = ALU_ADD; c.enALU = 1'b1; c.ldMA = 1'b1; j = JT_NEXT; end
      UA_LW + 6'd3: begin c.enMem = 1'b1; c.RegSel = RS_RD; c.enReg = 1'b1; c.RegWrt = 1'b1; j = JT_SPIN; end
      UA_LW + 6'd4: begin j = JT_FETCH; end
      // ---------------- store word
      UA_SW + 6'd0: begin c.RegSel = RS_RS1; c.enReg = 1'b1; c.ldA = 1'b1; j = JT_NEXT; end
      UA_SW + 6'd1: begin c.ImmSel = IMM_S; c.enImm = 1'b1; c.ldB = 1'b1; j = JT_NEXT; end
      UA_SW + 6'd2: begin c.ALUOp = ALU_ADD; c.enALU = 1'b1; c.ldMA = 1'b1; j = JT_NEXT; end
      UA_SW + 6'd3: begin c.RegSel = RS_RS2; c.enReg = 1'b1; c.enMem = 1'b1; c.MemWrt = 1'b1; j = JT_SPIN; end
      UA_SW + 6'd4: begin j = JT_FETCH; end
      // ---------------- branch if equal
      UA_BEQ + 6'd0: begin c.RegSel = RS_RS1; c.enReg = 1'b1; c.ldA = 1'b1; j = JT_NEXT; end
      UA_BEQ + 6'd1: begin c.RegSel = RS_RS2; c.enReg = 1'b1; c.ldB = 1'b1; j = JT_NEXT; end
      UA_BEQ + 6'd2: begin c.ALUOp = ALU_SUB; c.RegSel = RS_PC; c.enReg = 1'b1; c.ldA = 1'b1; j = JT_FFALSE; end
      UA_BEQ + 6'd3: begin c.ALUOp = ALU_DEC4; c.enALU = 1'b1; c.ldA = 1'b1; j = JT_NEXT; end
      UA_BEQ + 6'd4: begin c.ImmSel = IMM_B; c.enImm = 1'b1; c.ldB = 1'b1; j = JT_NEXT; end
      UA_BEQ + 6'd5: begin c.ALUOp = ALU_ADD; c.enALU = 1'b1; c.RegSel = RS_PC; c.enReg = 1'b1; c.RegWrt = 1'b1; j = JT_FETCH; end
      // ---------------- jump
      UA_J + 6'd0: begin c.RegSel = RS_PC; c.enReg = 1'b1; c.ldA = 1'b1; j = JT_NEXT; end
      UA_J + 6'd1: begin c.ALUOp = ALU_DEC4; c.enALU = 1'b1; c.ldA = 1'b1; j = JT_NEXT; end
      UA_J + 6'd2: begin c.ImmSel = IMM_IR; c.enImm = 1'b1; c.ldB = 1'b1; j = JT_NEXT; end
      UA_J + 6'd3: begin c.ALUOp = ALU_JTARG; c.enALU = 1'b1; c.RegSel = RS_PC; c.enReg = 1'b1; c.RegWrt = 1'b1; j = JT_FETCH; end
      // ---------------- jump register
      UA_JR + 6'd0: begin c.RegSel = RS_RS1; c.enReg = 1'b1; c.ldA = 1'b1; j = JT_NEXT; end
      UA_JR + 6'd1: begin c.ALUOp = ALU_COPY_A; c.enALU = 1'b1; c.RegSel = RS_PC; c.enReg = 1'b1; c.RegWrt = 1'b1; j = JT_FETCH; end
      // ---------------- jump and link
      UA_JAL + 6'd0: begin c.RegSel = RS_PC; c.enReg = 1'b1; c.ldA = 1'b1; j = JT_NEXT; end
      UA_JAL + 6'd1: begin c.ALUOp = ALU_COPY_A; c.enALU = 1'b1; c.RegSel = RS_RA; c.enReg = 1'b1; c.RegWrt = 1'b1; j = JT_NEXT; end
      UA_JAL + 6'd2: begin c.ALUOp = ALU_DEC4; c.enALU = 1'b1; c.ldA = 1'b1; j = JT_NEXT; end
      UA_JAL + 6'd3: begin c.ImmSel = IMM_IR; c.enImm = 1'b1; c.ldB = 1'b1; j = JT_NEXT; end
      UA_JAL + 6'd4: begin c.ALUOp = ALU_JTARG; c.enALU = 1'b1; c.RegSel = RS_PC; c.enReg = 1'b1; c.RegWrt = 1'b1; j = JT_FETCH; end
      // ---------------- jump and link register
      UA_JALR + 6'd0: begin c.RegSel = RS_PC; c.enReg = 1'b1; c.ldA = 1'b1; j = JT_NEXT; end
      UA_JALR + 6'd1: begin c.RegSel = RS_RS1; c.enReg = 1'b1; c.ldB = 1'b1; j = JT_NEXT; end
      UA_JALR + 6'd2: begin c.ALUOp = ALU_COPY_A; c.enALU = 1'b1; c.RegSel = RS_RA; c.enReg = 1'b1; c.RegWrt = 1'b1; j = JT_NEXT; end
      UA_JALR + 6'd3: begin c.ALUOp = ALU_COPY_B; c.enALU = 1'b1; c.RegSel = RS_PC; c.enReg = 1'b1; c.RegWrt = 1'b1; j = JT_FETCH; end
      // ---------------- memory-memory ALU: M[rd] <- M[rs1] op M[rs2]
      UA_ALUMM + 6'd0: begin c.RegSel = RS_RS1; c.enReg = 1'b1; c.ldMA = 1'b1; j = JT_NEXT; end
      UA_ALUMM + 6'd1: begin c.enMem = 1'b1; c.ldA = 1'b1; j = JT_SPIN; end
      UA_ALUMM + 6'd2: begin c.RegSel = RS_RS2; c.enReg = 1'b1; c.ldMA = 1'b1; j = JT_NEXT; end
      UA_ALUMM + 6'd3: begin c.enMem = 1'b1; c.ldB = 1'b1; j = JT_SPIN; end
      UA_ALUMM + 6'd4: begin c.RegSel = RS_RD; c.enReg = 1'b1; c.ldMA = 1'b1; j = JT_NEXT; end
      UA_ALUMM + 6'd5: begin c.ALUOp = ALU_FUNC_R; c.enALU = 1'b1; c.enMem = 1'b1; c.MemWrt = 1'b1; j = JT_SPIN; end
      UA_ALUMM + 6'd6: begin j = JT_FETCH; end
      default: begin c = CTRL_NOP; j = JT_FETCH; end
    endcase
  end

  assign uinst = '{ctrl: c, jt: j};

endmodule
