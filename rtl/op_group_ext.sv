// op_group_ext: the "ext" block of the RISC-V controller V2.
//
// Combinational. It reduces the instruction's opcode to an op-group and gives
// the microaddress of that group's first state, which the uPC takes on a
// dispatch. Doing this outside the control ROM keeps the opcode out of the
// ROM address and so keeps the ROM short (the lecture's "input encoding
// reduces ROM height").
//
// Op-groups from the lecture: ALU, ALUi, LW, SW, J, JAL, JR, JALR, beq and the
// memory-to-memory ALUMM example. Own choices: the opcode values (v1.0 RISC-V
// base encoding, ALUMM in the custom-0 slot), splitting JR from JALR by funct3
// of the shared jump-register opcode, every LOAD/STORE being a word access,
// every BRANCH being run as beq (the only branch the microcode gives), and an
// unknown opcode going straight back to fetch (no trap).
module op_group_ext
  import ucode_pkg::*;
(
  input  logic [6:0] opcode,
  input  logic [2:0] funct3,
  output uaddr_t     target,
  output logic       known     // opcode belongs to an op-group
);

  always_comb begin
    known = 1'b1;
    unique case (opcode)
      OPC_OP:     target = UA_ALU;
      OPC_OP_IMM: target = UA_ALUI;
      OPC_LOAD:   target = UA_LW;
      OPC_STORE:  target = UA_SW;
      OPC_BRANCH: target = UA_BEQ;
      OPC_J:      target = UA_J;
      OPC_JAL:    target = UA_JAL;
      OPC_JALR:   target = (funct3 == F3_JALR_C) ? UA_JALR : UA_JR;
      OPC_ALUMM:  target = UA_ALUMM;
      default: begin
        target = UA_FETCH;
        known  = 1'b0;
      end
    endcase
  end

endmodule
