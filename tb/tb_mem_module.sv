// tb_mem_module: the slow memory. Loads words through the loader port, then
// reads and writes them over the CPU side with Enable held, checking that
// busy lasts exactly LATENCY-1 cycles of each access, that data appears only
// in the last cycle, that Write stores the bus value and that the driver is
// on only for reads.
module tb_mem_module;
  import ucode_pkg::*;
  localparam int unsigned WORDS = 1024;  // defaults of mem_module
  localparam int unsigned LAT   = 3;
  logic clk = 0, rst_n = 0;
  logic [31:0] addr, din, dout;
  logic enable, write, drive, busy, ld_en;
  logic [9:0] ld_addr;
  logic [31:0] ld_data;
  logic [31:0] shadow [WORDS];
  int checks = 0, failures = 0;

  mem_module dut (
    .clk(clk), .rst_n(rst_n), .addr(addr), .enable(enable), .write(write), .din(din),
    .dout(dout), .drive(drive), .busy(busy), .ld_en(ld_en), .ld_addr(ld_addr), .ld_data(ld_data));

  always #5 clk = ~clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One access: hold enable until busy drops, count the cycles.
  task automatic access(input logic wr, input logic [31:0] a, input logic [31:0] d);
    int cyc;
    @(negedge clk);
    enable = 1; write = wr; addr = a; din = d; cyc = 0;
    forever begin
      #1;
      cyc++;
      chk(drive == !wr, "drive only on read");
      if (!busy) break;
      chk(dout == 0, "no data while busy");
      @(negedge clk);
    end
    chk(cyc == LAT, $sformatf("access took %0d cycles, expected %0d", cyc, LAT));
    if (!wr) chk(dout == shadow[a[11:2]], $sformatf("read %h got %h exp %h", a, dout, shadow[a[11:2]]));
    @(negedge clk);
    enable = 0; write = 0;
    if (wr) shadow[a[11:2]] = d;
  endtask

  initial begin
    enable = 0; write = 0; addr = 0; din = 0; ld_en = 0; ld_addr = 0; ld_data = 0;
    // loader port works during reset
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); ld_en = 1; ld_addr = 10'(i); ld_data = $urandom; shadow[i] = ld_data;
    end
    @(negedge clk); ld_en = 0; rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      access(1'($urandom), {20'd0, 10'($urandom), 2'b00}, $urandom);
      if (n % 7 == 0) repeat (2) @(negedge clk);  // idle gaps
    end
    // idle memory is never busy and never drives
    @(negedge clk); enable = 0; #1; chk(!busy && !drive, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
