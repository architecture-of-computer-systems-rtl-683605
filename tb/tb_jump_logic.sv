// tb_jump_logic: exhaustive check of the next-address rule for every jump
// type and every zero/busy combination.
module tb_jump_logic;
  import ucode_pkg::*;
  jump_t jt;
  logic zero, busy, stall;
  upc_src_t src, exp_src;
  int checks = 0, failures = 0;

  jump_logic dut (.jt(jt), .zero(zero), .busy(busy), .src(src), .stall(stall));

  initial begin
    for (int t = 0; t < 6; t++)
      for (int z = 0; z < 2; z++)
        for (int bz = 0; bz < 2; bz++) begin
          jt = jump_t'(t); zero = 1'(z); busy = 1'(bz);
          case (t)
            0: exp_src = SRC_INC;
            1: exp_src = bz ? SRC_HOLD : SRC_INC;
            2: exp_src = SRC_ABS;
            3: exp_src = SRC_DISPATCH;
            4: exp_src = z ? SRC_ABS : SRC_INC;
            default: exp_src = z ? SRC_INC : SRC_ABS;
          endcase
          #1;
          checks++;
          if (src !== exp_src || stall !== (t == 1 && bz == 1)) begin
            failures++;
            $display("FAIL jt=%0d zero=%0d busy=%0d src=%0d exp=%0d stall=%0d", t, z, bz, src, exp_src, stall);
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
