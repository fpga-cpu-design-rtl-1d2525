// Blinky: a free-running counter that blinks two LEDs in antiphase.
//
// A WIDTH-bit counter increments every clock. The red LED shows the
// counter's top bit and the green LED its inverse, so each LED is on for
// 2^(WIDTH-1) cycles out of every 2^WIDTH: with the default 22 bits and a
// 12 MHz clock, about 0.35 s on and 0.35 s off. The counter has no reset in
// the original example; here rst clears it so simulation starts from zero.
module blinky #(
  parameter int unsigned WIDTH = 22
) (
  input  logic clk,
  input  logic rst,
  output logic led_r,
  output logic led_g
);
  logic [WIDTH-1:0] counter;

  always_ff @(posedge clk) begin
    if (rst) counter <= '0;
    else     counter <= counter + 1'b1;
  end

  assign led_r = counter[WIDTH-1];
  assign led_g = ~led_r;
endmodule
