// tb_control_rom: walks every microprogram sequence from its start address
// and checks its length and its key microinstructions against the
// controller-2 tables, and checks that no word enables two bus drivers.
module tb_control_rom;
  import ucode_pkg::*;
  uaddr_t upc;
  uinst_t u;
  int checks = 0, failures = 0;

  control_rom dut (.upc(upc), .uinst(u));

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Number of states from start until (and including) the one that returns to fetch.
  task automatic seq_len(input int start, input int exp_len, input string name);
    int len;
    logic done;
    upc = 6'(start); len = 0; done = 0;
    while (!done) begin
      #1; len++;
      if (u.jt == JT_FETCH || u.jt == JT_DISPATCH || len > 20) done = 1;
      else upc = upc + 1;
    end
    chk(len == exp_len, $sformatf("%s has %0d states, expected %0d", name, len, exp_len));
  endtask

  function automatic int drivers(input ctrl_t c);
    return int'(c.enImm) + int'(c.enALU) + int'(c.enReg && !c.RegWrt) + int'(c.enMem && !c.MemWrt);
  endfunction

  initial begin
    seq_len(0, 3, "fetch");   seq_len(3, 3, "ALU");   seq_len(6, 3, "ALUi");
    seq_len(9, 5, "LW");      seq_len(14, 5, "SW");   seq_len(19, 6, "beq");
    seq_len(25, 4, "J");      seq_len(29, 2, "JR");   seq_len(31, 5, "JAL");
    seq_len(36, 4, "JALR");   seq_len(40, 7, "ALUMM");
    for (int i = 0; i < 64; i++) begin
      upc = 6'(i); #1;
      chk(drivers(u.ctrl) <= 1, $sformatf("uaddr %0d drives the bus twice", i));
      if (i >= 47) chk(u.jt == JT_FETCH && u.ctrl == CTRL_NOP, "unused word is a no-op to fetch");
    end
    // fetch0: MA, A <- PC
    upc = 0; #1;
    chk(u.ctrl.RegSel == RS_PC && u.ctrl.enReg && !u.ctrl.RegWrt && u.ctrl.ldMA && u.ctrl.ldA && u.jt == JT_NEXT, "fetch0");
    // fetch1: IR <- Memory, spin
    upc = 1; #1;
    chk(u.ctrl.enMem && !u.ctrl.MemWrt && u.ctrl.ldIR && u.jt == JT_SPIN, "fetch1");
    // fetch2: PC <- A + 4, dispatch
    upc = 2; #1;
    chk(u.ctrl.ALUOp == ALU_INC4 && u.ctrl.enALU && u.ctrl.RegSel == RS_PC && u.ctrl.RegWrt && u.ctrl.enReg && u.jt == JT_DISPATCH, "fetch2");
    // beq2: A <- PC, ffalse on A-B
    upc = 21; #1;
    chk(u.ctrl.ALUOp == ALU_SUB && u.ctrl.ldA && u.ctrl.RegSel == RS_PC && u.jt == JT_FFALSE, "beq2");
    // beq4: B <- BImm << 1
    upc = 23; #1;
    chk(u.ctrl.ImmSel == IMM_B && u.ctrl.enImm && u.ctrl.ldB, "beq4");
    // SW1 uses the store immediate, SW3 writes rs2 to memory
    upc = 15; #1; chk(u.ctrl.ImmSel == IMM_S && u.ctrl.enImm && u.ctrl.ldB, "SW1");
    upc = 17; #1; chk(u.ctrl.RegSel == RS_RS2 && u.ctrl.enMem && u.ctrl.MemWrt && u.jt == JT_SPIN, "SW3");
    // LW3: Reg[rd] <- Memory
    upc = 12; #1; chk(u.ctrl.RegSel == RS_RD && u.ctrl.RegWrt && u.ctrl.enMem && !u.ctrl.MemWrt && u.jt == JT_SPIN, "LW3");
    // JAL1: Reg[1] <- A
    upc = 32; #1; chk(u.ctrl.RegSel == RS_RA && u.ctrl.RegWrt && u.ctrl.ALUOp == ALU_COPY_A, "JAL1");
    // ALUMM5: Memory <- func(A,B)
    upc = 45; #1; chk(u.ctrl.ALUOp == ALU_FUNC_R && u.ctrl.enALU && u.ctrl.MemWrt && u.ctrl.enMem, "ALUMM5");
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
