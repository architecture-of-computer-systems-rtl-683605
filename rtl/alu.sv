// alu: the datapath ALU of the bus-based machine.
//
// Combinational. It computes every value the microprogram asks for: the
// address steps A+4 and A-4, A+B for effective addresses and branch targets,
// the jump target A + (B[31:7] << 1), copies of A or B, A-B for the beq
// comparison, and the register-register / register-immediate operations
// selected by the instruction's funct3. zero is high when the result is all
// zeros; it goes to the controller as the "zero?" status.
//
// The lecture names the ALU, its ALUOp input and the zero? output and lists the
// operations through the microcode. The operation encoding, the 4-bit ALUOp,
// and the use of funct3 plus one extra instruction bit (alt: SUB / SRA / SRAI)
// for func(A,B) follow the base RISC-V integer operations and are this design's
// choice. The jump offset is taken as signed.
module alu
  import ucode_pkg::*;
(
  input  logic [XLEN-1:0] a,
  input  logic [XLEN-1:0] b,
  input  aluop_t          op,
  input  logic [2:0]      funct3,
  input  logic            alt_r,   // IR[16]: SUB / SRA in register-register ops
  input  logic            alt_i,   // IR[20]: SRAI in register-immediate ops
  output logic [XLEN-1:0] result,
  output logic            zero
);

  function automatic logic [XLEN-1:0] funct_op(input logic [2:0] f3, input logic alt,
                                               input logic allow_sub,
                                               input logic [XLEN-1:0] x,
                                               input logic [XLEN-1:0] y);
    logic [4:0] sh;
    sh = y[4:0];
    unique case (f3)
      3'b000:  funct_op = (alt && allow_sub) ? x - y : x + y;
      3'b001:  funct_op = x << sh;
      3'b010:  funct_op = {31'd0, $signed(x) < $signed(y)};
      3'b011:  funct_op = {31'd0, x < y};
      3'b100:  funct_op = x ^ y;
      3'b101:  funct_op = alt ? XLEN'($signed(x) >>> sh) : x >> sh;
      3'b110:  funct_op = x | y;
      default: funct_op = x & y;
    endcase
  endfunction

  always_comb begin
    unique case (op)
      ALU_COPY_A: result = a;
      ALU_COPY_B: result = b;
      ALU_INC4:   result = a + 32'd4;
      ALU_DEC4:   result = a - 32'd4;
      ALU_ADD:    result = a + b;
      ALU_SUB:    result = a - b;
      ALU_FUNC_R: result = funct_op(funct3, alt_r, 1'b1, a, b);
      ALU_FUNC_I: result = funct_op(funct3, alt_i, 1'b0, a, b);
      ALU_JTARG:  result = a + {{6{b[31]}}, b[31:7], 1'b0};
      default:    result = a;
    endcase
  end

  assign zero = (result == '0);

endmodule
