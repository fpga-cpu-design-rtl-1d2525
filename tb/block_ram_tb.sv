// Testbench of the block RAM (depth reduced to 256 words). Random reads and
// byte-masked writes, some back to back, against a model array. Each access
// must be acknowledged exactly one cycle after it is presented, reads must
// return the model's word, and err must never be raised.
module block_ram_tb;
  localparam int D = 256;
  logic clk = 0, rst = 1;
  wb_if b();
  logic [31:0] model [D];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  block_ram #(.DEPTH(D)) dut (.clk, .rst, .bus(b.slave));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    b.cyc = 0; b.stb = 0; b.we = 0; b.sel = 0; b.adr = 0; b.dat_w = 0;
    for (int i = 0; i < D; i++) dut.mem[i] = 32'(i) * 32'h0101_0101;
    for (int i = 0; i < D; i++) model[i] = 32'(i) * 32'h0101_0101;
    repeat (2) @(negedge clk);
    rst = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 3000; i++) begin
      b.adr = 30'($urandom % D); b.we = $urandom; b.sel = $urandom; b.dat_w = $urandom;
      b.cyc = 1; b.stb = 1;
      #1 chk(!b.ack && !b.err, "no answer in the request cycle");
      @(posedge clk); #1;
      chk(b.ack && !b.err, "ack one cycle later");
      if (b.we) begin
        for (int k = 0; k < 4; k++) if (b.sel[k]) model[b.adr][8*k +: 8] = b.dat_w[8*k +: 8];
      end else chk(b.dat_r == model[b.adr], $sformatf("read %0d", b.adr));
      @(posedge clk); #1;       // the transfer ends on this edge
      b.cyc = 0; b.stb = 0;
      if ($urandom % 2) begin   // idle cycle; otherwise the next request follows at once
        #1 chk(!b.ack, "single ack");
        @(posedge clk); #1;
      end
    end
    b.cyc = 0; b.stb = 0;
    @(negedge clk);
    for (int i = 0; i < D; i++) chk(dut.mem[i] == model[i], "final contents");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
