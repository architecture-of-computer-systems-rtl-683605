// tb_op_group_ext: every opcode value, with every funct3, is mapped to the
// expected op-group start address (or to fetch when it is not an
// instruction of the machine).
module tb_op_group_ext;
  import ucode_pkg::*;
  logic [6:0] opcode;
  logic [2:0] funct3;
  uaddr_t target, exp_t;
  logic known;
  int checks = 0, failures = 0, groups_seen = 0;

  op_group_ext dut (.opcode(opcode), .funct3(funct3), .target(target), .known(known));

  initial begin
    for (int o = 0; o < 128; o++)
      for (int f = 0; f < 8; f++) begin
        opcode = 7'(o); funct3 = 3'(f);
        case (o)
          7'h33: exp_t = 6'd3;
          7'h13: exp_t = 6'd6;
          7'h03: exp_t = 6'd9;
          7'h23: exp_t = 6'd14;
          7'h63: exp_t = 6'd19;
          7'h67: exp_t = 6'd25;
          7'h6B: exp_t = (f == 0) ? 6'd36 : 6'd29;
          7'h6F: exp_t = 6'd31;
          7'h0B: exp_t = 6'd40;
          default: exp_t = 6'd0;
        endcase
        #1;
        checks++;
        if (target !== exp_t || known !== (exp_t != 0)) begin
          failures++;
          $display("FAIL opcode=%h f3=%0d target=%0d exp=%0d", o, f, target, exp_t);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
