// rv_asm_pkg: instruction encoders for the testbenches.
//
// Builds 32-bit instructions in the machine's field layout (rd [31:27],
// rs1 [26:22], rs2 [21:17], opcode [6:0]) so that test programs can be
// written as calls rather than hex. Immediates are given in bytes where the
// hardware scales them: branch and jump offsets are halved here.
package rv_asm_pkg;
  import ucode_pkg::*;

  function automatic logic [31:0] r_type(input logic [6:0] opc, input int rd, input int rs1,
                                          input int rs2, input logic [2:0] f3, input logic alt);
    return {5'(rd), 5'(rs1), 5'(rs2), alt, 6'd0, f3, opc};
  endfunction

  function automatic logic [31:0] i_type(input logic [6:0] opc, input int rd, input int rs1,
                                          input int imm, input logic [2:0] f3);
    logic [11:0] i;
    i = 12'(imm);
    return {5'(rd), 5'(rs1), i, f3, opc};
  endfunction

  function automatic logic [31:0] s_type(input logic [6:0] opc, input int rs1, input int rs2,
                                          input int imm, input logic [2:0] f3);
    logic [11:0] i;
    i = 12'(imm);
    return {i[11:7], 5'(rs1), 5'(rs2), i[6:0], f3, opc};
  endfunction

  function automatic logic [31:0] add_(input int rd, input int rs1, input int rs2);
    return r_type(OPC_OP, rd, rs1, rs2, 3'b000, 1'b0);
  endfunction
  function automatic logic [31:0] sub_(input int rd, input int rs1, input int rs2);
    return r_type(OPC_OP, rd, rs1, rs2, 3'b000, 1'b1);
  endfunction
  function automatic logic [31:0] addi(input int rd, input int rs1, input int imm);
    return i_type(OPC_OP_IMM, rd, rs1, imm, 3'b000);
  endfunction
  function automatic logic [31:0] andi(input int rd, input int rs1, input int imm);
    return i_type(OPC_OP_IMM, rd, rs1, imm, 3'b111);
  endfunction
  function automatic logic [31:0] srai(input int rd, input int rs1, input int sh);
    return i_type(OPC_OP_IMM, rd, rs1, 1024 + sh, 3'b101);
  endfunction
  function automatic logic [31:0] lw(input int rd, input int rs1, input int imm);
    return i_type(OPC_LOAD, rd, rs1, imm, 3'b010);
  endfunction
  function automatic logic [31:0] sw(input int rs2, input int rs1, input int imm);
    return s_type(OPC_STORE, rs1, rs2, imm, 3'b010);
  endfunction
  // byte offset, must be even
  function automatic logic [31:0] beq(input int rs1, input int rs2, input int off);
    return s_type(OPC_BRANCH, rs1, rs2, off / 2, 3'b000);
  endfunction
  function automatic logic [31:0] j_(input int off);
    return {25'(off / 2), OPC_J};
  endfunction
  function automatic logic [31:0] jal(input int off);
    return {25'(off / 2), OPC_JAL};
  endfunction
  function automatic logic [31:0] jr(input int rs1);
    return i_type(OPC_JALR, 0, rs1, 0, 3'b010);
  endfunction
  function automatic logic [31:0] jalr(input int rs1);
    return i_type(OPC_JALR, 1, rs1, 0, F3_JALR_C);
  endfunction
  // M[rd] <- M[rs1] op M[rs2]
  function automatic logic [31:0] alumm(input int rd, input int rs1, input int rs2,
                                         input logic [2:0] f3);
    return r_type(OPC_ALUMM, rd, rs1, rs2, f3, 1'b0);
  endfunction
endpackage
