// ucode_pkg: types and constants shared by the microcoded RISC-V machine.
//
// The machine executes 32-bit RISC-V instructions in the early (v1.0) field
// layout: rd in [31:27], rs1 in [26:22], rs2 in [21:17], opcode in [6:0].
// Every instruction is run as a short microprogram on a single-bus datapath.
// This package holds the microinstruction format (control points plus a
// jump type), the encodings of the multi-bit control fields, the op-groups
// that the dispatch stage decodes, and the microaddress of the first state
// of each op-group.
//
// From the lecture: the control point names (ldIR, ImmSel, enImm, ALUOp, ldA,
// ldB, enALU, RegSel, RegWrt, enReg, ldMA, MemWrt, enMem), the 2-bit ImmSel
// and 3-bit RegSel widths, the RegSel sources (PC, RA, rd, rs2, rs1), the six
// jump types and the op-groups. Own choices: every numeric encoding, a 4-bit
// ALUOp (so the word has 19 control bits rather than the 17 quoted), the
// opcode values (taken from the v1.0 RISC-V base encoding) and the
// microaddress map.
package ucode_pkg;

  localparam int unsigned XLEN = 32;
  // Microprogram counter width ("s" in the control store size estimate).
  localparam int unsigned UPC_W = 6;

  typedef logic [UPC_W-1:0] uaddr_t;

  // Register file address: 0..31 are x0..x31, 32 is the PC.
  localparam int unsigned RF_AW = 6;
  localparam logic [RF_AW-1:0] RF_PC = 6'd32;
  localparam logic [RF_AW-1:0] RF_RA = 6'd1;

  // Next-microaddress selection carried in each microinstruction.
  typedef enum logic [2:0] {
    JT_NEXT     = 3'd0,  // uPC + 1
    JT_SPIN     = 3'd1,  // stay while memory is busy, then uPC + 1
    JT_FETCH    = 3'd2,  // go to the instruction fetch sequence
    JT_DISPATCH = 3'd3,  // go to the first state of the op-group
    JT_FTRUE    = 3'd4,  // zero ? fetch : uPC + 1
    JT_FFALSE   = 3'd5   // zero ? uPC + 1 : fetch
  } jump_t;

  // Source the jump logic selects for the next uPC.
  typedef enum logic [1:0] {
    SRC_INC      = 2'd0,
    SRC_HOLD     = 2'd1,
    SRC_ABS      = 2'd2,
    SRC_DISPATCH = 2'd3
  } upc_src_t;

  typedef enum logic [2:0] {
    RS_PC  = 3'd0,
    RS_RA  = 3'd1,
    RS_RD  = 3'd2,
    RS_RS2 = 3'd3,
    RS_RS1 = 3'd4
  } regsel_t;

  typedef enum logic [1:0] {
    IMM_I  = 2'd0,  // sign-extended IR[21:10]            (ALUi, LW)
    IMM_S  = 2'd1,  // sign-extended {IR[31:27],IR[16:10]} (SW "BImm")
    IMM_B  = 2'd2,  // the same split immediate shifted left by one (beq)
    IMM_IR = 2'd3   // the whole IR                         (J, JAL)
  } immsel_t;

  typedef enum logic [3:0] {
    ALU_COPY_A = 4'd0,  // A
    ALU_COPY_B = 4'd1,  // B
    ALU_INC4   = 4'd2,  // A + 4
    ALU_DEC4   = 4'd3,  // A - 4
    ALU_ADD    = 4'd4,  // A + B
    ALU_SUB    = 4'd5,  // A - B (zero? is A == B)
    ALU_FUNC_R = 4'd6,  // func(A,B) from funct3 and IR[16]
    ALU_FUNC_I = 4'd7,  // Op(A,B)  from funct3 and IR[20]
    ALU_JTARG  = 4'd8   // A + sext(B[31:7] << 1)
  } aluop_t;

  // Control points of one microinstruction (horizontal encoding).
  typedef struct packed {
    logic    ldIR;
    immsel_t ImmSel;
    logic    enImm;
    aluop_t  ALUOp;
    logic    ldA;
    logic    ldB;
    logic    enALU;
    regsel_t RegSel;
    logic    RegWrt;
    logic    enReg;
    logic    ldMA;
    logic    MemWrt;
    logic    enMem;
  } ctrl_t;

  typedef struct packed {
    ctrl_t ctrl;
    jump_t jt;
  } uinst_t;

  localparam ctrl_t CTRL_NOP = '{
    ldIR: 1'b0, ImmSel: IMM_I, enImm: 1'b0, ALUOp: ALU_COPY_A, ldA: 1'b0,
    ldB: 1'b0, enALU: 1'b0, RegSel: RS_PC, RegWrt: 1'b0, enReg: 1'b0,
    ldMA: 1'b0, MemWrt: 1'b0, enMem: 1'b0};

  // Major opcodes (v1.0 RISC-V base encoding; OPC_ALUMM uses the custom-0 slot).
  localparam logic [6:0] OPC_LOAD   = 7'b0000011;
  localparam logic [6:0] OPC_ALUMM  = 7'b0001011;
  localparam logic [6:0] OPC_OP_IMM = 7'b0010011;
  localparam logic [6:0] OPC_STORE  = 7'b0100011;
  localparam logic [6:0] OPC_OP     = 7'b0110011;
  localparam logic [6:0] OPC_BRANCH = 7'b1100011;
  localparam logic [6:0] OPC_J      = 7'b1100111;
  localparam logic [6:0] OPC_JALR   = 7'b1101011;
  localparam logic [6:0] OPC_JAL    = 7'b1101111;
  // funct3 of OPC_JALR that links (call); the other values are plain JR.
  localparam logic [2:0] F3_JALR_C  = 3'b000;

  // First microaddress of each sequence.
  localparam uaddr_t UA_FETCH = 6'd0;   // 3 states
  localparam uaddr_t UA_ALU   = 6'd3;   // 3
  localparam uaddr_t UA_ALUI  = 6'd6;   // 3
  localparam uaddr_t UA_LW    = 6'd9;   // 5
  localparam uaddr_t UA_SW    = 6'd14;  // 5
  localparam uaddr_t UA_BEQ   = 6'd19;  // 6
  localparam uaddr_t UA_J     = 6'd25;  // 4
  localparam uaddr_t UA_JR    = 6'd29;  // 2
  localparam uaddr_t UA_JAL   = 6'd31;  // 5
  localparam uaddr_t UA_JALR  = 6'd36;  // 4
  localparam uaddr_t UA_ALUMM = 6'd40;  // 7
  localparam int unsigned UA_USED = 47;

endpackage
