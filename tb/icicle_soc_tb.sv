// Testbench of the Icicle system on a chip with a small RAM (1024 words) and a
// fast UART (8 clocks per bit). It boots from the SPI flash model a program
// built here with the instruction encoders: it writes 20 Fibonacci numbers to
// RAM, sums them back (load-use), does halfword and byte stores and loads,
// copies the GPIO inputs to the outputs, sends "Hi" on the UART polling its
// status register, loads from an unmapped address, reads the cycle and
// instret counters, calls a subroutine and spins. The testbench checks the
// RAM words the program leaves, the GPIO pins and the decoded UART line, and
// counts the pipeline and bus mechanisms (branch flush, load-use interlock,
// bypass from Execute, memory stall, bus arbitration conflict, bus error),
// failing for any that never occurs.
module icicle_soc_tb;
  import rv_asm_pkg::*;
  localparam logic [31:0] TEXT = 32'h0010_0000;
  localparam int DIV = 8;
  localparam logic [7:0] GIN = 8'h3C;
  localparam logic [4:0] ZERO = 0, RA = 1, T0 = 5, T1 = 6, T2 = 7, S0 = 8, S1 = 9,
                         A0 = 10, A1 = 11, A2 = 12, A3 = 13, A4 = 14, A5 = 15;

  logic clk = 0, rst = 1;
  logic flash_cs_n, flash_sck, flash_mosi, flash_miso;
  logic uart_tx, retire;
  logic [7:0] gpio_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  icicle_soc #(.RAM_WORDS(1024), .UART_DIV(DIV)) dut (
    .clk, .rst, .flash_cs_n, .flash_sck, .flash_mosi, .flash_miso,
    .uart_rx(uart_tx), .uart_tx, .gpio_in(GIN), .gpio_out, .retire);
  spi_flash_model #(.BASE(TEXT), .SIZE(1024)) flash (
    .cs_n(flash_cs_n), .sck(flash_sck), .mosi(flash_mosi), .miso(flash_miso));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [31:0] p [$];
  int spin_idx;
  task automatic build();
    int loop1, loop2, pollt, sub_at, jal_at;
    p.push_back(LUI(S0, 32'h4000_0000));
    p.push_back(ADDI(T0, ZERO, 1));
    p.push_back(ADDI(T1, ZERO, 1));
    p.push_back(ADDI(A1, ZERO, 20));
    p.push_back(ADDI(A0, S0, 0));
    loop1 = p.size();
    p.push_back(SW(T0, A0, 0));
    p.push_back(ADD(T2, T0, T1));
    p.push_back(ADDI(T0, T1, 0));
    p.push_back(ADDI(T1, T2, 0));
    p.push_back(ADDI(A0, A0, 4));
    p.push_back(ADDI(A1, A1, -1));
    p.push_back(BNE(A1, ZERO, 4 * (loop1 - p.size())));
    p.push_back(ADDI(A0, S0, 0));
    p.push_back(ADDI(A1, ZERO, 20));
    p.push_back(ADDI(A2, ZERO, 0));
    loop2 = p.size();
    p.push_back(LW(A3, A0, 0));
    p.push_back(ADD(A2, A2, A3));
    p.push_back(ADDI(A0, A0, 4));
    p.push_back(ADDI(A1, A1, -1));
    p.push_back(BNE(A1, ZERO, 4 * (loop2 - p.size())));
    p.push_back(SW(A2, S0, 100));
    p.push_back(SH(A2, S0, 104));
    p.push_back(LHU(A4, S0, 104));
    p.push_back(SW(A4, S0, 108));
    p.push_back(SB(A2, S0, 112));
    p.push_back(LB(A5, S0, 112));
    p.push_back(SW(A5, S0, 116));
    p.push_back(LUI(S1, 32'h8000_0000));
    p.push_back(LW(16, S1, 4));
    p.push_back(SW(16, S1, 0));
    p.push_back(LUI(19, 32'h8000_1000));
    p.push_back(ADDI(18, ZERO, 32'h48));
    p.push_back(SW(18, 19, 0));
    pollt = p.size();
    p.push_back(LW(20, 19, 4));
    p.push_back(ANDI(20, 20, 1));
    p.push_back(BEQ(20, ZERO, 4 * (pollt - p.size())));
    p.push_back(ADDI(18, ZERO, 32'h69));
    p.push_back(SW(18, 19, 0));
    p.push_back(LUI(21, 32'hC000_0000));
    p.push_back(LW(22, 21, 0));
    p.push_back(CSRR(23, 32'hC00));
    p.push_back(CSRR(24, 32'hC02));
    p.push_back(SW(23, S0, 120));
    p.push_back(SW(24, S0, 124));
    jal_at = p.size();
    p.push_back(NOP());                 // patched: jal ra, sub
    p.push_back(SW(25, S0, 128));
    spin_idx = p.size();
    p.push_back(JAL(ZERO, 0));
    sub_at = p.size();
    p.push_back(ADDI(25, ZERO, 77));
    p.push_back(JALR(ZERO, RA, 0));
    p[jal_at] = JAL(RA, 4 * (sub_at - jal_at));
    foreach (flash.mem[i]) flash.mem[i] = 8'hFF;
    foreach (p[i]) for (int b = 0; b < 4; b++) flash.mem[4 * i + b] = p[i][8 * b +: 8];
  endtask

  // UART line decoder
  logic [7:0] tx_bytes [$];
  initial forever begin
    logic [7:0] c;
    @(negedge uart_tx);
    repeat (DIV / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (DIV) @(posedge clk); c[i] = uart_tx; end
    repeat (DIV) @(posedge clk);
    if (uart_tx) tx_bytes.push_back(c);
  end

  int n_flush, n_interlock, n_byp_x, n_mstall, n_conflict, n_err;
  always @(posedge clk) if (!rst) begin
    if (dut.u_cpu.flush) n_flush++;
    if (dut.u_cpu.hazard && !dut.u_cpu.x_stall) n_interlock++;
    if (dut.u_cpu.m_stall) n_mstall++;
    if (dut.u_cpu.f_valid && !dut.u_cpu.d_stall && dut.u_cpu.d_ctrl.rs1_ren && dut.u_cpu.dx.valid
        && dut.u_cpu.dx.ctrl.rd_wen && dut.u_cpu.dx.rd == dut.u_cpu.d_rs1) n_byp_x++;
    if (dut.ibus.cyc && dut.dbus.cyc) n_conflict++;
    if (dut.sys.err) n_err++;
  end

  function automatic logic [31:0] ram(input int w);
    return dut.u_ram.mem[w];
  endfunction

  initial begin
    logic [31:0] a, b, t, sum;
    build();
    repeat (4) @(posedge clk);
    rst = 0;
    do @(posedge clk); while (!(retire && dut.u_cpu.mw.pc == TEXT + 4 * spin_idx));
    repeat (20 * DIV) @(posedge clk);
    a = 1; b = 1; sum = 0;
    for (int i = 0; i < 20; i++) begin
      chk(ram(i) == a, $sformatf("Fibonacci word %0d", i));
      sum += a; t = a + b; a = b; b = t;
    end
    chk(ram(25) == sum, "sum read back");
    chk(ram(26)[15:0] == sum[15:0], "halfword store");
    chk(ram(27) == {16'd0, sum[15:0]}, "halfword load zero-extends");
    chk(ram(28)[7:0] == sum[7:0], "byte store");
    chk(ram(29) == {{24{sum[7]}}, sum[7:0]}, "byte load sign-extends");
    chk(ram(30) > ram(31) && ram(31) > 60, "cycle and instret counters");
    chk(ram(32) == 77, "subroutine call and return");
    chk(gpio_out == GIN, "GPIO inputs copied to outputs");
    chk(tx_bytes.size() == 2 && tx_bytes[0] == 8'h48 && tx_bytes[1] == 8'h69, "UART sent Hi");
    chk(n_flush > 0, "no branch flush");
    chk(n_interlock > 0, "no load-use interlock");
    chk(n_byp_x > 0, "no bypass from Execute");
    chk(n_mstall > 0, "no memory stall");
    chk(n_conflict > 0, "no bus conflict");
    chk(n_err > 0, "no bus error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
