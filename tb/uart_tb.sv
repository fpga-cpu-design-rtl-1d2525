// Testbench of the UART with the divider reduced to 8 clocks per bit, the
// transmitter looped back to the receiver. Each random byte written to the
// data register must appear on tx as a correct 8N1 frame (checked by a
// line decoder sampling the middle of each bit), must then be received, set
// rx_valid in the status register, be read back from the data register, and
// the read must clear rx_valid. tx_ready must be low while a frame is sent.
module uart_tb;
  localparam int DIV = 8;
  logic clk = 0, rst = 1;
  logic p_sel = 0, p_we = 0;
  logic [11:0] p_addr = 0;
  logic [31:0] p_wdata = 0, p_rdata;
  logic tx;
  int checks = 0, failures = 0;
  logic [7:0] line_q [$];
  always #5 clk = ~clk;
  uart #(.CLK_DIV(DIV)) dut (.clk, .rst, .p_sel, .p_addr, .p_we, .p_wdata, .p_rdata, .rx(tx), .tx);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // line decoder: start bit, 8 data bits LSB first, stop bit
  initial begin
    logic [7:0] d;
    forever begin
      @(negedge tx);
      repeat (DIV / 2) @(posedge clk);
      chk(tx == 0, "start bit");
      for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); d[i] = tx; end
      repeat (DIV) @(posedge clk);
      chk(tx == 1, "stop bit");
      line_q.push_back(d);
    end
  end

  task automatic rd(input logic [11:0] a, output logic [31:0] d);
    @(negedge clk) p_sel = 1; p_we = 0; p_addr = a;
    #1 d = p_rdata;
    @(negedge clk) p_sel = 0;
  endtask

  initial begin
    logic [31:0] st, d;
    logic [7:0] b;
    repeat (2) @(negedge clk);
    rst = 0;
    rd(12'h4, st); chk(st == 32'h1, "status after reset: tx ready, nothing received");
    for (int i = 0; i < 60; i++) begin
      b = $urandom;
      @(negedge clk) p_sel = 1; p_we = 1; p_addr = 0; p_wdata = {24'hFFFFFF, b};
      @(negedge clk) p_sel = 0;
      rd(12'h4, st); chk(st[0] == 0, "tx busy");
      do rd(12'h4, st); while (!st[1] && !$isunknown(st));
      chk(line_q.size() == 1 && line_q[0] == b, $sformatf("line carried %h", b));
      line_q.delete();
      rd(12'h0, d); chk(d == {24'd0, b}, "received byte");
      rd(12'h4, st); chk(st[1] == 0, "rx_valid cleared by the read");
      do rd(12'h4, st); while (!st[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
