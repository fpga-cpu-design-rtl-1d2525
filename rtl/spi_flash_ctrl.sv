// Flash controller: a read-only Wishbone window onto a serial (SPI) flash.
//
// A read of word address adr sends the flash the standard READ command 0x03,
// the 24-bit byte address {adr[21:0], 2'b00} and then clocks in four bytes,
// which form the little-endian word (first byte in bits 7:0). SPI mode 0:
// sck idles low, the controller changes mosi while sck is low and samples
// miso on the rising edge. sck runs at half the system clock, so a read takes
// 2*64 + 2 cycles. A write is acknowledged and ignored. cs_n is low for the
// whole transfer; ack is a one-cycle pulse when the word is complete.
//
// The original only names a flash block holding the program. The SPI command,
// mode, clock rate and byte order are this design's own.
module spi_flash_ctrl (
  input  logic clk,
  input  logic rst,
  wb_if.slave  bus,
  output logic spi_cs_n,
  output logic spi_sck,
  output logic spi_mosi,
  input  logic spi_miso
);
  typedef enum logic [1:0] { IDLE, SHIFT, DONE } state_e;
  state_e      state;
  logic [5:0]  bit_cnt;   // 0..63: 8 command bits, 24 address bits, 32 data bits
  logic [31:0] out_sr;    // command and address, MSB first
  logic [31:0] in_sr;

  assign bus.err   = 1'b0;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= IDLE;
      spi_cs_n <= 1'b1;
      spi_sck  <= 1'b0;
      spi_mosi <= 1'b0;
      bus.ack  <= 1'b0;
      bit_cnt  <= '0;
      out_sr   <= '0;
      in_sr    <= '0;
      bus.dat_r <= '0;
    end else begin
      bus.ack <= 1'b0;
      unique case (state)
        IDLE: if (bus.cyc && bus.stb && !bus.ack) begin
          if (bus.we) begin
            bus.ack <= 1'b1;
          end else begin
            state    <= SHIFT;
            spi_cs_n <= 1'b0;
            out_sr   <= {8'h03, bus.adr[21:0], 2'b00};
            spi_mosi <= 1'b0;          // bit 7 of 0x03
            bit_cnt  <= '0;
          end
        end
        SHIFT: begin
          if (!spi_sck) begin
            spi_sck <= 1'b1;           // rising edge: flash samples mosi, we sample miso
            in_sr   <= {in_sr[30:0], spi_miso};
          end else begin
            spi_sck <= 1'b0;
            if (bit_cnt == 6'd63) begin
              state <= DONE;
            end else begin
              bit_cnt  <= bit_cnt + 6'd1;
              out_sr   <= {out_sr[30:0], 1'b0};
              spi_mosi <= out_sr[30];
            end
          end
        end
        default: begin  // DONE
          spi_cs_n  <= 1'b1;
          bus.dat_r <= {in_sr[7:0], in_sr[15:8], in_sr[23:16], in_sr[31:24]};
          bus.ack   <= 1'b1;
          state     <= IDLE;
        end
      endcase
    end
  end
endmodule
