// tb_microcoded_rv32: end-to-end run of the whole machine at its default
// sizes (1024-word memory, 3-cycle memory latency), observed only through
// the top's ports.
//
// A test program is loaded through the loader port during reset. It uses
// every op-group (ALU, ALUi, LW, SW, beq taken and not taken, J, JR, JAL,
// JALR and the memory-to-memory ALUMM), stores the registers it computed to
// memory at 512 + 4*r, and halts in a jump-to-self at 184. The testbench
// logs every completed store (ma, bus while mem_write is high) and checks it
// against values worked out by hand. It also checks the cycle count of every
// instruction against its microprogram length plus LATENCY-1 cycles per
// memory access, and counts how often each mechanism happened: cycles spent
// spinning on a busy memory, dispatch to each op-group, the beq decision
// (ffalse) both ways, and memory writes.
module tb_microcoded_rv32;
  import ucode_pkg::*;
  import rv_asm_pkg::*;

  localparam int unsigned LAT   = 3;    // default memory latency of the top
  localparam int unsigned NPROG = 47;
  localparam logic [31:0] HALT_PC = 32'd184;
  logic clk = 0, rst_n = 0;
  logic ld_en;
  logic [9:0] ld_addr;
  logic [31:0] ld_data, ma, bus;
  logic [5:0] upc;
  logic busy, instr_start, mem_write;
  int checks = 0, failures = 0;

  microcoded_rv32 dut (.clk(clk), .rst_n(rst_n), .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data),
                       .upc(upc), .ma(ma), .bus(bus), .busy(busy), .instr_start(instr_start),
                       .mem_write(mem_write));

  always #5 clk = ~clk;

  logic [31:0] prog [NPROG];
  logic [31:0] exp_reg [19];
  initial begin
    prog[0]  = addi(1, 0, 5);
    prog[1]  = addi(2, 0, 7);
    prog[2]  = add_(3, 1, 2);
    prog[3]  = sub_(4, 2, 1);
    prog[4]  = sw(3, 0, 256);
    prog[5]  = lw(5, 0, 256);
    prog[6]  = beq(5, 3, 8);        // taken -> 32
    prog[7]  = addi(6, 0, 1);       // skipped
    prog[8]  = beq(1, 2, 8);        // not taken
    prog[9]  = addi(9, 0, 256);
    prog[10] = addi(10, 0, 260);
    prog[11] = addi(11, 0, 264);
    prog[12] = sw(4, 0, 260);
    prog[13] = alumm(11, 9, 10, 3'b000);  // M[264] <- M[256] + M[260]
    prog[14] = lw(12, 0, 264);
    prog[15] = jal(16);             // 60 -> 76, x1 = 64
    prog[16] = addi(13, 0, 42);
    prog[17] = j_(44);              // 68 -> 112
    prog[18] = addi(7, 0, 1);       // never
    prog[19] = addi(14, 0, -3);
    prog[20] = andi(15, 14, 15);
    prog[21] = addi(16, 1, 0);
    prog[22] = addi(17, 0, 104);
    prog[23] = jalr(17);            // 92 -> 104, x1 = 96
    prog[24] = jr(16);              // 96 -> 64
    prog[25] = addi(8, 0, 1);       // never
    prog[26] = srai(18, 14, 1);
    prog[27] = jr(1);               // 108 -> 96
    for (int r = 1; r <= 18; r++) prog[27 + r] = sw(r, 0, 512 + 4 * r);   // 112..180
    prog[46] = j_(0);               // 184: halt
    exp_reg = '{0, 96, 7, 12, 2, 12, 0, 0, 0, 256, 260, 264, 14, 42,
                32'hFFFFFFFD, 13, 64, 104, 32'hFFFFFFFE};
  end

  // ---------------------------------------------------------------- monitors
  int cyc_in_instr = 0, n_instr = 0, halt_seen = 0;
  int group_start = -1;
  bit beq_taken_flag = 0;
  int spins = 0, mem_writes = 0, beq_taken = 0, beq_not_taken = 0;
  int group_count [int];
  logic [31:0] wlog [int];
  logic [5:0] prev_upc = 0;

  function automatic int group_cycles(input logic [5:0] g, input bit taken);
    int mem_extra = LAT - 1;
    case (g)
      UA_ALU, UA_ALUI: return 3;
      UA_LW, UA_SW:    return 5 + mem_extra;
      UA_BEQ:          return taken ? 6 : 3;
      UA_J:            return 4;
      UA_JR:           return 2;
      UA_JAL:          return 5;
      UA_JALR:         return 4;
      UA_ALUMM:        return 7 + 3 * mem_extra;
      default:         return 0;
    endcase
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (instr_start) begin
      if (n_instr > 0) begin
        int exp_c;
        exp_c = 3 + (LAT - 1) + group_cycles(6'(group_start), beq_taken_flag);
        checks++;
        if (cyc_in_instr != exp_c) begin
          failures++;
          $display("FAIL instruction in group %0d took %0d cycles, expected %0d", group_start, cyc_in_instr, exp_c);
        end
      end
      n_instr++;
      cyc_in_instr = 1;
      beq_taken_flag = 0;
    end else begin
      cyc_in_instr++;
    end
    if (prev_upc == UA_FETCH + 2) begin
      group_start = int'(upc);
      group_count[int'(upc)] = group_count.exists(int'(upc)) ? group_count[int'(upc)] + 1 : 1;
    end
    if (prev_upc == UA_BEQ + 2) begin
      if (upc == UA_BEQ + 3) begin beq_taken++; beq_taken_flag = 1; end
      else if (upc == UA_FETCH) beq_not_taken++;
    end
    if (prev_upc == UA_FETCH && upc == UA_FETCH + 1 && ma == HALT_PC) halt_seen++;
    if (busy) spins++;
    if (mem_write) begin
      mem_writes++;
      wlog[int'(ma)] = bus;
    end
    prev_upc = upc;
  end

  // ---------------------------------------------------------------- checks
  task automatic chk_store(input int addr, input logic [31:0] exp, input string what);
    checks++;
    if (!wlog.exists(addr)) begin
      failures++;
      $display("FAIL no store to %0d (%s)", addr, what);
    end else if (wlog[addr] !== exp) begin
      failures++;
      $display("FAIL store to %0d (%s) = %h, expected %h", addr, what, wlog[addr], exp);
    end
  endtask
  task automatic chk_count(input int n, input string what);
    checks++;
    if (n < 1) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-24s %0d", what, n);
  endtask
  function automatic int gc(input logic [5:0] g);
    return group_count.exists(int'(g)) ? group_count[int'(g)] : 0;
  endfunction

  initial begin
    ld_en = 0; ld_addr = 0; ld_data = 0;
    #1;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      ld_en = 1; ld_addr = 10'(i); ld_data = (i < NPROG) ? prog[i] : 32'd0;
    end
    @(negedge clk);
    ld_en = 0;
    rst_n = 1;
    // run until the halt instruction has been fetched a second time
    while (halt_seen < 2) @(negedge clk);
    for (int r = 1; r <= 18; r++) chk_store(512 + 4 * r, exp_reg[r], $sformatf("x%0d", r));
    chk_store(256, 12, "SW x3");
    chk_store(260, 2, "SW x4");
    chk_store(264, 14, "ALUMM sum");
    checks++;
    if (n_instr != 45) begin failures++; $display("FAIL %0d instructions fetched, expected 45", n_instr); end
    $display("mechanisms:");
    chk_count(spins, "memory busy (spin) cycles");
    chk_count(mem_writes, "memory writes");
    chk_count(beq_taken, "beq taken");
    chk_count(beq_not_taken, "beq not taken");
    chk_count(gc(UA_ALU),   "dispatch ALU");
    chk_count(gc(UA_ALUI),  "dispatch ALUi");
    chk_count(gc(UA_LW),    "dispatch LW");
    chk_count(gc(UA_SW),    "dispatch SW");
    chk_count(gc(UA_BEQ),   "dispatch beq");
    chk_count(gc(UA_J),     "dispatch J");
    chk_count(gc(UA_JR),    "dispatch JR");
    chk_count(gc(UA_JAL),   "dispatch JAL");
    chk_count(gc(UA_JALR),  "dispatch JALR");
    chk_count(gc(UA_ALUMM), "dispatch ALUMM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
