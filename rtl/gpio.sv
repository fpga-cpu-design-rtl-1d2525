// GPIO peripheral on the peripheral bus.
//
// Register 0x0: the WIDTH output pins, read/write. Register 0x4: the WIDTH
// input pins, read only, through a two-flip-flop synchroniser. Outputs reset
// to zero. Reads are combinational from the registers (peripheral bus rule);
// writes take effect at the end of the strobe cycle.
//
// The original only names a GPIO block on the peripheral bus. Its width and
// register map are this design's own.
module gpio #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             p_sel,
  input  logic [11:0]      p_addr,
  input  logic             p_we,
  input  logic [31:0]      p_wdata,
  output logic [31:0]      p_rdata,
  input  logic [WIDTH-1:0] gpio_in,
  output logic [WIDTH-1:0] gpio_out
);
  logic [WIDTH-1:0] in_meta, in_sync;

  always_ff @(posedge clk) begin
    if (rst) begin
      gpio_out <= '0;
      in_meta  <= '0;
      in_sync  <= '0;
    end else begin
      in_meta <= gpio_in;
      in_sync <= in_meta;
      if (p_sel && p_we && p_addr[3:2] == 2'd0) gpio_out <= p_wdata[WIDTH-1:0];
    end
  end

  always_comb begin
    unique case (p_addr[3:2])
      2'd0:    p_rdata = 32'(gpio_out);
      2'd1:    p_rdata = 32'(in_sync);
      default: p_rdata = '0;
    endcase
  end
endmodule
