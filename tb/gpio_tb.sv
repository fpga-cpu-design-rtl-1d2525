// Testbench of the GPIO peripheral: random register writes and reads. The
// output register must follow writes to offset 0 and read back; writes
// elsewhere must not change it; offset 4 must return the input pins two
// cycles after they change (synchroniser) and other offsets read zero.
module gpio_tb;
  localparam int W = 8;
  logic clk = 0, rst = 1;
  logic p_sel = 0, p_we = 0;
  logic [11:0] p_addr = 0;
  logic [31:0] p_wdata = 0, p_rdata;
  logic [W-1:0] gin = 0, gout;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  gpio #(.WIDTH(W)) dut (.clk, .rst, .p_sel, .p_addr, .p_we, .p_wdata, .p_rdata, .gpio_in(gin), .gpio_out(gout));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    logic [W-1:0] out_m, in_d1, in_d2;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk) chk(gout == 0, "outputs reset low");
    out_m = 0; in_d1 = gin; in_d2 = gin;
    for (int i = 0; i < 3000; i++) begin
      p_sel = $urandom % 2; p_we = $urandom; p_addr = 12'(4 * ($urandom % 4)); p_wdata = $urandom;
      #1;
      if (p_sel && !p_we)
        chk(p_rdata == (p_addr == 0 ? 32'(out_m) : p_addr == 4 ? 32'(in_d2) : 32'd0), $sformatf("read offset %0d", p_addr));
      @(posedge clk);
      if (p_sel && p_we && p_addr == 0) out_m = p_wdata[W-1:0];
      in_d2 = in_d1; in_d1 = gin;
      @(negedge clk);
      chk(gout == out_m, "output pins");
      if ($urandom % 3 == 0) gin = $urandom;
    end
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
