// mem_module: the slow main memory on the machine's bus.
//
// A word-organised RAM that holds the user program and its data. The CPU
// side follows the memory-module figure: an address (from MA), an Enable and a
// Write(1)/Read(0) line, data in from the bus, data out to the bus through a
// driver that is on only for an enabled read, and a busy output. The RAM's
// write enable is Write AND Enable.
//
// Timing: an access takes LATENCY clock cycles. The controller holds Enable
// (and Write) high for the whole access, in a "spin" microinstruction. busy is
// high in the first LATENCY-1 of those cycles and low in the last one; in that
// last cycle read data is on dout and a write is stored at the clock edge.
// While busy, dout is zero. LATENCY = 1 gives a single-cycle memory.
//
// A second write port (ld_*) loads the memory from outside before the CPU is
// released from reset; it is this design's addition, as are the word size of
// the array, the byte address with the two low bits ignored, and LATENCY. The
// lecture only says the memory is slow compared to a register transfer and
// takes several CPU cycles per access.
module mem_module
  import ucode_pkg::*;
#(
  parameter int unsigned WORDS   = 1024,
  parameter int unsigned LATENCY = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // CPU side
  input  logic [XLEN-1:0]          addr,     // byte address from MA
  input  logic                     enable,   // enMem
  input  logic                     write,    // MemWrt: Write(1) / Read(0)
  input  logic [XLEN-1:0]          din,      // from the bus
  output logic [XLEN-1:0]          dout,     // to the bus when drive is high
  output logic                     drive,    // Enable AND NOT Write
  output logic                     busy,
  // loader port
  input  logic                     ld_en,
  input  logic [$clog2(WORDS)-1:0] ld_addr,  // word address
  input  logic [XLEN-1:0]          ld_data
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [XLEN-1:0] mem [WORDS];
  logic [7:0]      cnt;        // cycles of the current access already spent
  logic            last;       // final cycle of an access
  logic [AW-1:0]   widx;
  logic            we;

  assign widx  = addr[AW+1:2];
  assign last  = enable && (32'(cnt) >= LATENCY - 1);
  assign busy  = enable && !last;
  assign we    = write && enable && last;
  assign drive = enable && !write;
  assign dout  = (drive && last) ? mem[widx] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            cnt <= '0;
    else if (!enable || last) cnt <= '0;
    else                   cnt <= cnt + 8'd1;
  end

  always_ff @(posedge clk) begin
    if (ld_en)   mem[ld_addr] <= ld_data;
    else if (we) mem[widx]    <= din;
  end

  initial begin
    assert (LATENCY >= 1 && LATENCY <= 255) else $error("LATENCY out of range");
  end

endmodule
