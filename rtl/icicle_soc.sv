// Icicle system on chip: the core, a Wishbone arbiter, block RAM, a flash
// window and a bridge to a peripheral bus with GPIO and a UART.
//
// The core's instruction and data ports meet in the arbiter, which drives the
// shared Wishbone bus. The bus is decoded on the byte address:
//   0x0000_0000 - 0x00FF_FFFF  SPI flash, read only (program at 0x0010_0000)
//   0x4000_0000 - 0x4001_FFFF  block RAM, 128 KiB (data, bss, stack)
//   0x8000_0000 - 0x8000_FFFF  peripheral bus: GPIO at +0x0000, UART at +0x1000
// Any other address is answered with err one cycle later. The core starts at
// RESET_VECTOR, the first word of the program image in flash. rst is
// synchronous and active high.
//
// Follows the original: the block structure (core, arbiter, block RAM, flash,
// bridge to a peripheral bus with GPIO and UART), and the flash and RAM
// addresses and sizes of the C program's memory layout. Own choices: the
// peripheral addresses and the error answer for unmapped addresses.
module icicle_soc
  import icicle_pkg::*;
#(
  parameter logic [31:0] RESET_VECTOR = RESET_VECTOR_DEFAULT,
  parameter int unsigned RAM_WORDS    = 32768,
  parameter int unsigned GPIO_WIDTH   = 8,
  parameter int unsigned UART_DIV     = 104
) (
  input  logic                  clk,
  input  logic                  rst,
  // SPI flash
  output logic                  flash_cs_n,
  output logic                  flash_sck,
  output logic                  flash_mosi,
  input  logic                  flash_miso,
  // UART
  input  logic                  uart_rx,
  output logic                  uart_tx,
  // GPIO
  input  logic [GPIO_WIDTH-1:0] gpio_in,
  output logic [GPIO_WIDTH-1:0] gpio_out,
  // one pulse per retired instruction
  output logic                  retire
);
  wb_if ibus ();
  wb_if dbus ();
  wb_if sys ();
  wb_if flash_bus ();
  wb_if ram_bus ();
  wb_if bridge_bus ();

  icicle_cpu #(.RESET_VECTOR(RESET_VECTOR)) u_cpu (
    .clk, .rst,
    .ibus_adr(ibus.adr), .ibus_dat_w(ibus.dat_w), .ibus_sel(ibus.sel),
    .ibus_cyc(ibus.cyc), .ibus_stb(ibus.stb), .ibus_we(ibus.we),
    .ibus_dat_r(ibus.dat_r), .ibus_ack(ibus.ack), .ibus_err(ibus.err),
    .dbus_adr(dbus.adr), .dbus_dat_w(dbus.dat_w), .dbus_sel(dbus.sel),
    .dbus_cyc(dbus.cyc), .dbus_stb(dbus.stb), .dbus_we(dbus.we),
    .dbus_dat_r(dbus.dat_r), .dbus_ack(dbus.ack), .dbus_err(dbus.err),
    .retire
  );

  wb_arbiter u_arbiter (.clk, .rst, .ibus(ibus.slave), .dbus(dbus.slave), .bus(sys.master));

  // ---------------------------------------------------------------- decoder
  logic [31:0] byte_addr;
  logic        hit_flash, hit_ram, hit_periph, miss_err;

  assign byte_addr  = {sys.adr, 2'b00};
  assign hit_flash  = byte_addr[31:24] == FLASH_BASE[31:24];
  assign hit_ram    = byte_addr[31:17] == RAM_BASE[31:17];
  assign hit_periph = byte_addr[31:16] == PERIPH_BASE[31:16];

  always_comb begin
    flash_bus.adr    = sys.adr;  ram_bus.adr    = sys.adr;  bridge_bus.adr    = sys.adr;
    flash_bus.dat_w  = sys.dat_w; ram_bus.dat_w = sys.dat_w; bridge_bus.dat_w = sys.dat_w;
    flash_bus.sel    = sys.sel;  ram_bus.sel    = sys.sel;  bridge_bus.sel    = sys.sel;
    flash_bus.we     = sys.we;   ram_bus.we     = sys.we;   bridge_bus.we     = sys.we;
    flash_bus.stb    = sys.stb;  ram_bus.stb    = sys.stb;  bridge_bus.stb    = sys.stb;
    flash_bus.cyc    = sys.cyc && hit_flash;
    ram_bus.cyc      = sys.cyc && hit_ram;
    bridge_bus.cyc   = sys.cyc && hit_periph;

    if (hit_flash)       sys.dat_r = flash_bus.dat_r;
    else if (hit_ram)    sys.dat_r = ram_bus.dat_r;
    else                 sys.dat_r = bridge_bus.dat_r;
    sys.ack = (hit_flash && flash_bus.ack) || (hit_ram && ram_bus.ack) || (hit_periph && bridge_bus.ack);
    sys.err = (hit_flash && flash_bus.err) || (hit_ram && ram_bus.err) || (hit_periph && bridge_bus.err)
              || miss_err;
  end

  always_ff @(posedge clk) begin
    if (rst) miss_err <= 1'b0;
    else     miss_err <= sys.cyc && sys.stb && !miss_err && !(hit_flash || hit_ram || hit_periph);
  end

  // ---------------------------------------------------------------- slaves
  spi_flash_ctrl u_flash (
    .clk, .rst, .bus(flash_bus.slave),
    .spi_cs_n(flash_cs_n), .spi_sck(flash_sck), .spi_mosi(flash_mosi), .spi_miso(flash_miso)
  );

  block_ram #(.DEPTH(RAM_WORDS)) u_ram (.clk, .rst, .bus(ram_bus.slave));

  logic        p_stb, p_we;
  logic [1:0]  p_sel;
  logic [11:0] p_addr;
  logic [31:0] p_wdata;
  logic [31:0] p_rdata [2];

  wb_bridge #(.NPERIPH(2)) u_bridge (
    .clk, .rst, .bus(bridge_bus.slave),
    .p_stb, .p_sel, .p_addr, .p_we, .p_wdata, .p_rdata
  );

  gpio #(.WIDTH(GPIO_WIDTH)) u_gpio (
    .clk, .rst, .p_sel(p_sel[0]), .p_addr, .p_we, .p_wdata, .p_rdata(p_rdata[0]),
    .gpio_in, .gpio_out
  );

  uart #(.CLK_DIV(UART_DIV)) u_uart (
    .clk, .rst, .p_sel(p_sel[1]), .p_addr, .p_we, .p_wdata, .p_rdata(p_rdata[1]),
    .rx(uart_rx), .tx(uart_tx)
  );
endmodule
