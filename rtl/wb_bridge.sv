// Bridge from the Wishbone system bus to the simple peripheral bus.
//
// The peripheral bus is a single-cycle bus: for one cycle the bridge raises
// p_stb with p_addr (byte offset within the peripheral), p_we and p_wdata,
// and one-hot p_sel[i] for the peripheral chosen by address bits 15:12
// (peripheral i occupies a 4 KiB slot). The peripheral acts on that cycle
// and returns its read data combinationally on its p_rdata lane; the bridge
// registers the selected lane and acknowledges on the next cycle. A slot with
// no peripheral answers with err. Only full-word accesses are meaningful.
//
// The original only shows a bridge from Wishbone to a peripheral bus; that
// bus's signals, the 4 KiB slots and the registered answer are this design's
// own.
module wb_bridge #(
  parameter int unsigned NPERIPH = 2
) (
  input  logic               clk,
  input  logic               rst,
  wb_if.slave                bus,
  output logic               p_stb,
  output logic [NPERIPH-1:0] p_sel,
  output logic [11:0]        p_addr,
  output logic               p_we,
  output logic [31:0]        p_wdata,
  input  logic [31:0]        p_rdata [NPERIPH]
);
  logic [3:0] slot;
  logic       hit;

  assign slot    = bus.adr[13:10];
  assign hit     = 32'(slot) < NPERIPH;
  assign p_stb   = bus.cyc && bus.stb && !bus.ack && !bus.err && hit;
  assign p_addr  = {bus.adr[9:0], 2'b00};
  assign p_we    = bus.we;
  assign p_wdata = bus.dat_w;

  always_comb begin
    for (int i = 0; i < NPERIPH; i++) p_sel[i] = p_stb && (32'(slot) == i);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bus.ack   <= 1'b0;
      bus.err   <= 1'b0;
      bus.dat_r <= '0;
    end else begin
      bus.ack <= p_stb;
      bus.err <= bus.cyc && bus.stb && !bus.ack && !bus.err && !hit;
      for (int i = 0; i < NPERIPH; i++)
        if (p_sel[i]) bus.dat_r <= p_rdata[i];
    end
  end
endmodule
