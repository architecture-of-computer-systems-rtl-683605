// tb_ucontroller: drives opcode, zero and busy into the controller and
// follows the uPC through fetch, spin, dispatch and the branch decision.
module tb_ucontroller;
  import ucode_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [6:0] opcode;
  logic [2:0] funct3;
  logic zero, busy, stall;
  ctrl_t ctrl;
  uaddr_t upc;
  jump_t jt;
  int checks = 0, failures = 0;

  ucontroller dut (.clk(clk), .rst_n(rst_n), .opcode(opcode), .funct3(funct3), .zero(zero),
                   .busy(busy), .ctrl(ctrl), .stall(stall), .upc(upc), .jt(jt));

  always #5 clk = ~clk;

  task automatic expect_upc(input int exp, input string what);
    @(negedge clk);
    checks++;
    if (upc != 6'(exp)) begin failures++; $display("FAIL %s: upc=%0d exp=%0d", what, upc, exp); end
  endtask

  // fetch with a memory that is busy for `wait_cycles` cycles
  task automatic fetch(input logic [6:0] opc, input logic [2:0] f3, input int wait_cycles);
    opcode = opc; funct3 = f3; busy = 0; zero = 0;
    checks++;
    if (upc != 0) begin failures++; $display("FAIL not at fetch0: %0d", upc); end
    expect_upc(1, "fetch1");
    for (int i = 0; i < wait_cycles; i++) begin
      busy = 1; #1;
      checks++;
      if (!stall) begin failures++; $display("FAIL no stall while busy"); end
      expect_upc(1, "spin");
    end
    busy = 0;
    expect_upc(2, "fetch2");
  endtask

  initial begin
    opcode = 0; funct3 = 0; zero = 0; busy = 0;
    @(negedge clk);
    rst_n = 1;
    // ALU op with 2 busy cycles
    fetch(OPC_OP, 0, 2);
    expect_upc(3, "dispatch ALU"); expect_upc(4, "ALU1"); expect_upc(5, "ALU2"); expect_upc(0, "back to fetch");
    // beq not taken (zero = 0 at beq2 -> fetch)
    fetch(OPC_BRANCH, 0, 1);
    expect_upc(19, "beq0"); expect_upc(20, "beq1"); zero = 0; expect_upc(21, "beq2");
    expect_upc(0, "beq not taken");
    // beq taken
    fetch(OPC_BRANCH, 0, 0);
    expect_upc(19, "beq0"); expect_upc(20, "beq1"); expect_upc(21, "beq2"); zero = 1;
    expect_upc(22, "beq taken"); zero = 0;
    expect_upc(23, "beq4"); expect_upc(24, "beq5"); expect_upc(0, "fetch");
    // JALR vs JR by funct3
    fetch(OPC_JALR, 3'b000, 0); expect_upc(36, "JALR");
    for (int i = 37; i < 40; i++) expect_upc(i, "JALR seq");
    expect_upc(0, "fetch");
    fetch(OPC_JALR, 3'b010, 0); expect_upc(29, "JR"); expect_upc(30, "JR1"); expect_upc(0, "fetch");
    // unknown opcode returns to fetch
    fetch(7'h7F, 0, 0); expect_upc(0, "unknown");
    // LW with a spin in LW3
    fetch(OPC_LOAD, 3'b010, 0); expect_upc(9, "LW0"); expect_upc(10, "LW1"); expect_upc(11, "LW2");
    expect_upc(12, "LW3"); busy = 1; expect_upc(12, "LW3 spin"); busy = 0; expect_upc(13, "LW4"); expect_upc(0, "fetch");
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
