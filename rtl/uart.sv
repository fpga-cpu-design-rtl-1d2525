// UART peripheral on the peripheral bus: 8 data bits, no parity, 1 stop bit.
//
// One bit lasts CLK_DIV system clocks. Register 0x0: a write sends the low
// byte (ignored while the transmitter is busy); a read returns the last byte
// received and clears the receive flag. Register 0x4 (read only): bit 0 is
// set while the transmitter can take a byte, bit 1 while a received byte is
// waiting. The receiver synchronises rx, waits half a bit after the falling
// start edge, checks the start bit is still low and then samples each data bit
// in its middle; a byte whose stop bit is low is dropped. tx idles high.
//
// The original only names a UART block on the peripheral bus. The frame
// format, baud rate and register map are this design's own.
module uart #(
  parameter int unsigned CLK_DIV = 104  // 12 MHz / 115200 baud
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        p_sel,
  input  logic [11:0] p_addr,
  input  logic        p_we,
  input  logic [31:0] p_wdata,
  output logic [31:0] p_rdata,
  input  logic        rx,
  output logic        tx
);
  localparam int unsigned CW = $clog2(CLK_DIV + 1);

  // ---------------- transmitter
  logic [9:0]    tx_sr;
  logic [3:0]    tx_bits;   // bits still to send
  logic [CW-1:0] tx_cnt;
  logic          tx_ready;

  assign tx_ready = (tx_bits == 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_sr   <= '1;
      tx_bits <= '0;
      tx_cnt  <= '0;
      tx      <= 1'b1;
    end else if (tx_ready) begin
      tx <= 1'b1;
      if (p_sel && p_we && p_addr[3:2] == 2'd0) begin
        tx_sr   <= {1'b1, p_wdata[7:0], 1'b0};  // stop, data LSB first, start
        tx_bits <= 4'd10;
        tx_cnt  <= '0;
      end
    end else begin
      tx <= tx_sr[0];
      if (tx_cnt == CW'(CLK_DIV - 1)) begin
        tx_cnt  <= '0;
        tx_sr   <= {1'b1, tx_sr[9:1]};
        tx_bits <= tx_bits - 4'd1;
      end else begin
        tx_cnt <= tx_cnt + CW'(1);
      end
    end
  end

  // ---------------- receiver
  typedef enum logic [1:0] { RX_IDLE, RX_START, RX_DATA, RX_STOP } rx_state_e;
  rx_state_e     rx_state;
  logic          rx_meta, rx_sync;
  logic [CW-1:0] rx_cnt;
  logic [2:0]    rx_bit;
  logic [7:0]    rx_sr, rx_data;
  logic          rx_valid;
  logic          rd_data;

  assign rd_data = p_sel && !p_we && p_addr[3:2] == 2'd0;

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_meta  <= 1'b1;
      rx_sync  <= 1'b1;
      rx_state <= RX_IDLE;
      rx_cnt   <= '0;
      rx_bit   <= '0;
      rx_sr    <= '0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
    end else begin
      rx_meta <= rx;
      rx_sync <= rx_meta;
      if (rd_data) rx_valid <= 1'b0;
      unique case (rx_state)
        RX_IDLE: if (!rx_sync) begin
          rx_state <= RX_START;
          rx_cnt   <= '0;
        end
        RX_START: begin
          if (rx_cnt == CW'(CLK_DIV / 2 - 1)) begin
            rx_cnt   <= '0;
            rx_bit   <= '0;
            rx_state <= rx_sync ? RX_IDLE : RX_DATA;
          end else rx_cnt <= rx_cnt + CW'(1);
        end
        RX_DATA: begin
          if (rx_cnt == CW'(CLK_DIV - 1)) begin
            rx_cnt <= '0;
            rx_sr  <= {rx_sync, rx_sr[7:1]};
            if (rx_bit == 3'd7) rx_state <= RX_STOP;
            rx_bit <= rx_bit + 3'd1;
          end else rx_cnt <= rx_cnt + CW'(1);
        end
        default: begin  // RX_STOP
          if (rx_cnt == CW'(CLK_DIV - 1)) begin
            rx_cnt   <= '0;
            rx_state <= RX_IDLE;
            if (rx_sync) begin
              rx_data  <= rx_sr;
              rx_valid <= 1'b1;
            end
          end else rx_cnt <= rx_cnt + CW'(1);
        end
      endcase
    end
  end

  always_comb begin
    unique case (p_addr[3:2])
      2'd0:    p_rdata = {24'd0, rx_data};
      2'd1:    p_rdata = {30'd0, rx_valid, tx_ready};
      default: p_rdata = '0;
    endcase
  end
endmodule
