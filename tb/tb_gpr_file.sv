// tb_gpr_file: random writes and reads of the 32 registers and the PC slot
// against a shadow array; x0 must stay zero and reset must clear all.
module tb_gpr_file;
  import ucode_pkg::*;
  logic clk = 0, rst_n = 0, we;
  logic [5:0] addr;
  logic [31:0] wdata, rdata;
  logic [31:0] shadow [33];
  int checks = 0, failures = 0;

  gpr_file dut (.clk(clk), .rst_n(rst_n), .addr(addr), .we(we), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 33; i++) shadow[i] = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 33; i++) begin
      @(negedge clk); addr = 6'(i); #1; checks++;
      if (rdata !== 0) begin failures++; $display("FAIL reset r%0d=%h", i, rdata); end
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      addr = 6'($urandom_range(0, 32));
      we = 1'($urandom);
      wdata = $urandom;
      #1;
      checks++;
      if (rdata !== shadow[addr]) begin failures++; $display("FAIL read r%0d=%h exp %h", addr, rdata, shadow[addr]); end
      if (we && addr != 0) shadow[addr] = wdata;
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
