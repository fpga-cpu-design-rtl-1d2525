// Block RAM: on-chip read/write memory on the Wishbone bus.
//
// DEPTH words of 32 bits with byte-lane writes (sel). A request is answered
// one cycle after it appears: the read word and ack are registered. The
// address is taken modulo DEPTH (the bus decoder places the memory). Its
// contents are not initialised; software clears what it uses.
//
// Follows the original: an on-chip block RAM on the Wishbone bus holding the
// program's 128 KiB of data and stack. Own choices: registered read with a
// one-cycle ack, and byte-lane writes.
module block_ram #(
  parameter int unsigned DEPTH = 32768  // 128 KiB
) (
  input  logic clk,
  input  logic rst,
  wb_if.slave  bus
);
  localparam int unsigned AW = $clog2(DEPTH);
  logic [31:0] mem [DEPTH];
  logic [AW-1:0] idx;
  logic req;

  assign idx     = bus.adr[AW-1:0];
  assign req     = bus.cyc && bus.stb && !bus.ack;
  assign bus.err = 1'b0;

  always_ff @(posedge clk) begin
    if (req) begin
      bus.dat_r <= mem[idx];
      if (bus.we) begin
        for (int i = 0; i < 4; i++)
          if (bus.sel[i]) mem[idx][8*i +: 8] <= bus.dat_w[8*i +: 8];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) bus.ack <= 1'b0;
    else     bus.ack <= req;
  end
endmodule
