// Testbench of the blinker at a reduced counter width (8 bits): the red LED
// must follow the counter's top bit, the green LED its inverse, and the red
// LED must change exactly every 2^(WIDTH-1) cycles.
module blinky_tb;
  localparam int W = 8;
  logic clk = 0, rst = 1, led_r, led_g;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  blinky #(.WIDTH(W)) dut (.clk, .rst, .led_r, .led_g);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int n = 0, last = 0, toggles = 0;
    logic prev;
    @(negedge clk) rst = 0;
    prev = led_r;
    check(led_r == 0 && led_g == 1, "after reset: red off, green on");
    repeat (6 * (1 << (W - 1))) begin
      @(negedge clk);
      n++;
      check(led_r == n[W-1] && led_g == !led_r, $sformatf("cycle %0d leds %b%b", n, led_r, led_g));
      if (led_r != prev) begin
        check(n - last == (1 << (W - 1)), $sformatf("half period %0d", n - last));
        last = n; toggles++;
      end
      prev = led_r;
    end
    check(toggles == 6, "six half periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
