// Behavioural model of a serial NOR flash chip, for simulation only.
//
// Understands the READ command (0x03): after cs_n falls it takes 8 command
// bits and a 24-bit address on mosi, sampled on rising sck edges, then shifts
// out the bytes from that address onwards, most significant bit first,
// changing miso on falling sck edges (SPI mode 0). It holds SIZE bytes that
// appear at flash addresses BASE .. BASE+SIZE-1; other addresses read as
// 0xFF, like erased flash. The testbench fills mem directly.
module spi_flash_model #(
  parameter int unsigned BASE = 32'h0010_0000,
  parameter int unsigned SIZE = 8192
) (
  input  logic cs_n,
  input  logic sck,
  input  logic mosi,
  output logic miso
);
  logic [7:0]  mem [SIZE];
  logic [31:0] sr;
  int unsigned nbits;
  int unsigned reads;   // completed READ commands (for statistics)

  initial begin
    miso  = 1'b0;
    nbits = 0;
    reads = 0;
  end

  function automatic logic [7:0] byte_at(input logic [31:0] a);
    if (a >= BASE && a < BASE + SIZE) return mem[a - BASE];
    return 8'hFF;
  endfunction

  always @(negedge cs_n) nbits = 0;
  always @(posedge cs_n) if (nbits >= 32) reads++;

  always @(posedge sck) if (!cs_n) begin
    if (nbits < 32) sr = {sr[30:0], mosi};
    nbits++;
  end

  always @(negedge sck) if (!cs_n && nbits >= 32 && sr[31:24] == 8'h03) begin
    int unsigned k;
    logic [7:0] b;
    k = nbits - 32;
    b = byte_at({8'd0, sr[23:0]} + k / 8);
    miso = b[7 - (k % 8)];
  end
endmodule
