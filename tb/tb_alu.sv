// tb_alu: random and directed checks of every ALU operation against a
// reference written with plain SystemVerilog arithmetic.
module tb_alu;
  import ucode_pkg::*;
  logic [31:0] a, b, y, exp_y;
  aluop_t op;
  logic [2:0] f3;
  logic alt_r, alt_i, zero;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .op(op), .funct3(f3), .alt_r(alt_r), .alt_i(alt_i), .result(y), .zero(zero));

  function automatic logic [31:0] ref_f(input logic [2:0] f, input logic alt, input logic is_r,
                                        input logic [31:0] x, input logic [31:0] z);
    case (f)
      0: return (alt && is_r) ? x - z : x + z;
      1: return x << z[4:0];
      2: return ($signed(x) < $signed(z)) ? 32'd1 : 32'd0;
      3: return (x < z) ? 32'd1 : 32'd0;
      4: return x ^ z;
      5: return alt ? 32'($signed(x) >>> z[4:0]) : x >> z[4:0];
      6: return x | z;
      default: return x & z;
    endcase
  endfunction

  task automatic check(input string what);
    #1;
    checks++;
    if (y !== exp_y || zero !== (exp_y == 0)) begin
      failures++;
      $display("FAIL %s op=%0d f3=%0d a=%h b=%h y=%h exp=%h", what, op, f3, a, b, y, exp_y);
    end
  endtask

  initial begin
    // watchdog not needed beyond time: pure combinational, bounded loop
    for (int n = 0; n < 3000; n++) begin
      a = $urandom; b = (n % 3 == 0) ? a : $urandom; f3 = 3'($urandom); alt_r = 1'($urandom); alt_i = 1'($urandom);
      op = aluop_t'(n % 9);
      case (op)
        ALU_COPY_A: exp_y = a;
        ALU_COPY_B: exp_y = b;
        ALU_INC4:   exp_y = a + 4;
        ALU_DEC4:   exp_y = a - 4;
        ALU_ADD:    exp_y = a + b;
        ALU_SUB:    exp_y = a - b;
        ALU_FUNC_R: exp_y = ref_f(f3, alt_r, 1'b1, a, b);
        ALU_FUNC_I: exp_y = ref_f(f3, alt_i, 1'b0, a, b);
        default:    exp_y = a + 32'($signed(b[31:7]) * 2);
      endcase
      check("random");
    end
    // directed: jump target with negative offset, beq compare
    a = 32'h100; b = {25'h1FFFFFE, 7'h67}; op = ALU_JTARG; exp_y = 32'hFC; check("jtarg neg");
    a = 32'd77; b = 32'd77; op = ALU_SUB; exp_y = 0; check("eq zero");
    a = 32'hFFFFFFF0; b = 32'd2; op = ALU_FUNC_I; f3 = 3'b101; alt_i = 1; exp_y = 32'hFFFFFFFC; check("srai");
    a = 32'd5; b = 32'd7; op = ALU_FUNC_R; f3 = 3'b000; alt_r = 1; exp_y = 32'hFFFFFFFE; check("sub");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
