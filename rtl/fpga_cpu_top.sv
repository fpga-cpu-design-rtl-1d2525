// Top level: the Icicle system on chip beside the two small examples that
// come with it, the LED blinker and the basic logic elements (an AND gate and
// a D flip-flop with set/reset). The three share only the clock and reset and
// each has its own pins.
//
// The original presents these as separate designs, so they sit side by side
// here. Own choices: a single clock and synchronous active-high reset for all
// of them, and the GPIO width.
module fpga_cpu_top #(
  parameter int unsigned GPIO_WIDTH = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  // Icicle SoC
  output logic                  flash_cs_n,
  output logic                  flash_sck,
  output logic                  flash_mosi,
  input  logic                  flash_miso,
  input  logic                  uart_rx,
  output logic                  uart_tx,
  input  logic [GPIO_WIDTH-1:0] gpio_in,
  output logic [GPIO_WIDTH-1:0] gpio_out,
  output logic                  retire,
  // blinky
  output logic                  led_r,
  output logic                  led_g,
  // logic examples
  input  logic                  and_a,
  input  logic                  and_b,
  output logic                  and_y,
  input  logic                  dff_d,
  input  logic                  dff_s,
  input  logic                  dff_r,
  output logic                  dff_q,
  output logic                  dff_q_n
);
  icicle_soc #(.GPIO_WIDTH(GPIO_WIDTH)) u_soc (
    .clk, .rst,
    .flash_cs_n, .flash_sck, .flash_mosi, .flash_miso,
    .uart_rx, .uart_tx, .gpio_in, .gpio_out, .retire
  );

  blinky u_blinky (.clk, .rst, .led_r, .led_g);

  and_gate u_and (.a(and_a), .b(and_b), .y(and_y));

  d_flip_flop u_dff (.clk, .d(dff_d), .s(dff_s), .r(dff_r), .q(dff_q), .q_n(dff_q_n));
endmodule
