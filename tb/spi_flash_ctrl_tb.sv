// Testbench of the flash controller connected to the behavioural SPI flash
// model. Random word reads inside the model's contents must return the four
// bytes at that address as a little-endian word; reads outside return the
// erased value. Checks the read time, cs_n framing, that sck idles low, that
// writes are acknowledged without reaching the flash, and the flash's own
// count of READ commands.
module spi_flash_ctrl_tb;
  localparam int unsigned BASE = 32'h0010_0000, SIZE = 4096;
  logic clk = 0, rst = 1;
  wb_if b();
  logic cs_n, sck, mosi, miso;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  spi_flash_ctrl dut (.clk, .rst, .bus(b.slave), .spi_cs_n(cs_n), .spi_sck(sck), .spi_mosi(mosi), .spi_miso(miso));
  spi_flash_model #(.BASE(BASE), .SIZE(SIZE)) flash (.cs_n, .sck, .mosi, .miso);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int n_reads = 0, cyc_n;
    logic [31:0] a, exp;
    b.cyc = 0; b.stb = 0; b.we = 0; b.sel = 4'hF; b.adr = 0; b.dat_w = 0;
    for (int i = 0; i < SIZE; i++) flash.mem[i] = $urandom;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk) chk(cs_n && !sck, "idle: cs_n high, sck low");
    for (int i = 0; i < 120; i++) begin
      bit wr = (i % 10 == 9);
      a = (i % 8 == 7) ? (BASE + SIZE + 4 * ($urandom % 64)) : (BASE + 4 * ($urandom % (SIZE / 4)));
      b.adr = a[31:2]; b.we = wr; b.dat_w = $urandom; b.cyc = 1; b.stb = 1;
      cyc_n = 0;
      while (!b.ack) begin
        @(negedge clk);
        cyc_n++;
        if (!b.ack && !wr && cyc_n > 1) chk(!cs_n, "cs_n low during the read");
        if (cyc_n > 200) break;
      end
      if (wr) chk(cyc_n == 1 && cs_n, "write acknowledged at once, flash untouched");
      else begin
        n_reads++;
        chk(cyc_n == 2 * 64 + 2, $sformatf("read time %0d cycles", cyc_n));
        exp = (a < BASE + SIZE) ? {flash.mem[a - BASE + 3], flash.mem[a - BASE + 2], flash.mem[a - BASE + 1], flash.mem[a - BASE]}
                                : 32'hFFFF_FFFF;
        chk(b.dat_r == exp, $sformatf("read %h got %h expected %h", a, b.dat_r, exp));
      end
      b.cyc = 0; b.stb = 0;
      @(negedge clk) chk(!b.ack && cs_n && !sck, "single ack, flash deselected");
    end
    chk(flash.reads == n_reads, $sformatf("flash saw %0d READ commands, expected %0d", flash.reads, n_reads));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
