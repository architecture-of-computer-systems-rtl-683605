// tb_bus_datapath: applies hand-built microinstructions to the datapath, with
// the testbench acting as memory, and checks register transfers over the
// bus: register writes and reads, A/B/IR/MA loads, ALU results, immediates,
// the PC slot, the zero flag and that stall blocks every load.
module tb_bus_datapath;
  import ucode_pkg::*;
  import rv_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  ctrl_t c;
  logic stall, mem_drive, zero;
  logic [31:0] mem_rdata, ma, bus;
  logic [6:0] opcode;
  logic [2:0] funct3;
  int checks = 0, failures = 0;

  bus_datapath dut (.clk(clk), .rst_n(rst_n), .ctrl(c), .stall(stall), .mem_rdata(mem_rdata),
                    .mem_drive(mem_drive), .ma(ma), .bus(bus), .opcode(opcode), .funct3(funct3), .zero(zero));

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (bus=%h ma=%h)", what, bus, ma); end
  endtask

  // one clock with control word cc; the testbench drives the bus as memory when md
  task automatic step(input ctrl_t cc, input logic md = 0, input logic [31:0] md_data = 0);
    c = cc; mem_drive = md; mem_rdata = md ? md_data : 32'd0;
    @(negedge clk);
    c = CTRL_NOP; mem_drive = 0; mem_rdata = 0;
  endtask

  function automatic ctrl_t reg_rd(input regsel_t rs);
    ctrl_t x = CTRL_NOP; x.RegSel = rs; x.enReg = 1; return x;
  endfunction
  function automatic ctrl_t reg_wr(input regsel_t rs);
    ctrl_t x = CTRL_NOP; x.RegSel = rs; x.enReg = 1; x.RegWrt = 1; return x;
  endfunction

  task automatic read_reg(input regsel_t rs, input logic [31:0] exp, input string what);
    c = reg_rd(rs); #1;
    chk(bus == exp, $sformatf("%s = %h, expected %h", what, bus, exp));
    @(negedge clk); c = CTRL_NOP;
  endtask

  initial begin
    ctrl_t x;
    c = CTRL_NOP; stall = 0; mem_drive = 0; mem_rdata = 0;
    #12 rst_n = 1;
    @(negedge clk);
    // IR <- Memory : add x3, x1, x2
    x = CTRL_NOP; x.ldIR = 1; step(x, 1, add_(3, 1, 2));
    chk(opcode == OPC_OP && funct3 == 0, "IR opcode/funct3");
    // x1 <- 100, x2 <- 23 from the bus
    step(reg_wr(RS_RS1), 1, 100);
    step(reg_wr(RS_RS2), 1, 23);
    read_reg(RS_RS1, 100, "x1");
    read_reg(RS_RS2, 23, "x2");
    // ALU sequence: A <- rs1, B <- rs2, rd <- func(A,B)
    x = reg_rd(RS_RS1); x.ldA = 1; step(x);
    x = reg_rd(RS_RS2); x.ldB = 1; step(x);
    x = reg_wr(RS_RD); x.ALUOp = ALU_FUNC_R; x.enALU = 1; step(x);
    read_reg(RS_RD, 123, "x3 = x1 + x2");
    // MA <- A + B
    x = CTRL_NOP; x.ALUOp = ALU_ADD; x.enALU = 1; x.ldMA = 1; step(x);
    chk(ma == 123, "MA <- A+B");
    // zero flag: A - B with A != B, then with A == B
    c = CTRL_NOP; c.ALUOp = ALU_SUB; #1; chk(!zero, "zero low when A != B"); @(negedge clk);
    x = reg_rd(RS_RS1); x.ldB = 1; step(x);
    c = CTRL_NOP; c.ALUOp = ALU_SUB; #1; chk(zero, "zero high when A == B"); @(negedge clk);
    // PC slot: PC <- 0x40 from memory; MA, A <- PC; PC <- A + 4
    step(reg_wr(RS_PC), 1, 32'h40);
    x = reg_rd(RS_PC); x.ldMA = 1; x.ldA = 1; step(x);
    chk(ma == 32'h40, "MA <- PC");
    x = reg_wr(RS_PC); x.ALUOp = ALU_INC4; x.enALU = 1; step(x);
    read_reg(RS_PC, 32'h44, "PC <- A+4");
    // x0 stays zero
    x = CTRL_NOP; x.ldIR = 1; step(x, 1, addi(0, 0, 5));
    step(reg_wr(RS_RD), 1, 32'hDEAD);
    read_reg(RS_RD, 0, "x0");
    // immediate: B <- Imm (negative), observed through MA <- A + B
    x = CTRL_NOP; x.ldIR = 1; step(x, 1, addi(7, 1, -12));
    c = CTRL_NOP; c.ImmSel = IMM_I; c.enImm = 1; #1; chk(bus == 32'hFFFFFFF4, "Imm on bus"); @(negedge clk);
    // stall blocks every load and the register write
    stall = 1;
    x = CTRL_NOP; x.ldA = 1; x.ldB = 1; x.ldMA = 1; x.ldIR = 1; step(x, 1, 32'h12345678);
    step(reg_wr(RS_RS1), 1, 32'h5555);
    stall = 0;
    chk(ma == 32'h40, "MA held by stall");
    chk(opcode == OPC_OP_IMM, "IR held by stall");
    read_reg(RS_RS1, 100, "x1 held by stall");
    // RA slot: x1 <- A
    x = reg_wr(RS_RA); x.ALUOp = ALU_COPY_A; x.enALU = 1; step(x);
    read_reg(RS_RA, 32'h40, "x1 <- A");
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
