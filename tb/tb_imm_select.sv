// tb_imm_select: checks each immediate form against fields cut from random
// instruction words by independent arithmetic.
module tb_imm_select;
  import ucode_pkg::*;
  logic [31:0] ir, imm, exp_imm;
  immsel_t sel;
  int checks = 0, failures = 0;

  imm_select dut (.ir(ir), .sel(sel), .imm(imm));

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int v;
      ir = $urandom;
      sel = immsel_t'(n % 4);
      case (sel)
        IMM_I:  begin v = int'(ir[21:10]); if (v >= 2048) v -= 4096; exp_imm = 32'(v); end
        IMM_S:  begin v = int'(ir[31:27]) * 128 + int'(ir[16:10]); if (v >= 2048) v -= 4096; exp_imm = 32'(v); end
        IMM_B:  begin v = int'(ir[31:27]) * 128 + int'(ir[16:10]); if (v >= 2048) v -= 4096; exp_imm = 32'(v * 2); end
        default: exp_imm = ir;
      endcase
      #1;
      checks++;
      if (imm !== exp_imm) begin
        failures++;
        $display("FAIL sel=%0d ir=%h imm=%h exp=%h", sel, ir, imm, exp_imm);
      end
    end
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
