// End-to-end testbench of the whole top level at its default parameters.
//
// The Icicle system boots from a model of the SPI flash holding a program
// built here with the instruction encoders: the usual C start-up sequence
// (zero .bss, copy .data from flash to RAM, set the stack pointer to the top
// of the 128 KiB RAM, call main, then spin) followed by a main that sums an
// array copied into RAM, writes the sum to the GPIO outputs, reads the GPIO
// inputs, sends "OK" on the UART, receives a byte from it, reads the cycle and
// instret counters, does byte stores and sign-extending loads, runs a short
// routine that start-up copied into RAM (so code also executes from RAM),
// touches an unmapped address, and returns. The testbench checks every
// result word main leaves in .bss, that the rest of .bss is zero, the copied
// .data, the GPIO pins and the UART line (decoded here). Beside it, it
// checks the blinker's counter and LEDs and drives the AND gate and flip-flop
// examples. It counts each mechanism (branch flush, load-use interlock,
// bypass from Execute and from Mem Access, memory stall, bus arbitration
// conflict, flash read, RAM write, peripheral access, bus error, UART
// transmit and receive, GPIO write) and fails for any that never occurs.
module fpga_cpu_top_tb;
  import rv_asm_pkg::*;

  localparam logic [31:0] TEXT       = 32'h0010_0000;
  localparam logic [31:0] RAM        = 32'h4000_0000;
  localparam logic [31:0] STACK_TOP  = 32'h4002_0000;
  localparam int          NDATA      = 8;
  localparam int          NBSS       = 16;
  localparam int          BIT_CYCLES = 104;       // UART divider of the top's default
  localparam logic [7:0]  GPIO_IN    = 8'hA5;
  localparam logic [7:0]  RX_BYTE    = 8'h5A;

  // registers
  localparam logic [4:0] ZERO = 0, RA = 1, SP = 2, T0 = 5, T1 = 6, T2 = 7, S0 = 8, S1 = 9,
                         A0 = 10, A1 = 11, A2 = 12, A3 = 13, A4 = 14, A5 = 15, T3 = 28;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic flash_cs_n, flash_sck, flash_mosi, flash_miso;
  logic uart_rx = 1'b1, uart_tx;
  logic [7:0] gpio_in = GPIO_IN, gpio_out;
  logic retire, led_r, led_g;
  logic and_a = 0, and_b = 0, and_y, dff_d = 0, dff_s = 0, dff_r = 0, dff_q, dff_q_n;

  fpga_cpu_top dut (.*);
  spi_flash_model #(.BASE(TEXT), .SIZE(8192)) flash (
    .cs_n(flash_cs_n), .sck(flash_sck), .mosi(flash_mosi), .miso(flash_miso));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------------ program
  logic [31:0] text [$];
  logic [31:0] data [$];
  int          la_fix [int];     // text index -> symbol number
  int          lbl [string];
  typedef struct { int idx; string target; } bfix_t;
  bfix_t       bfix [$];
  logic [31:0] dval [NDATA];

  // symbols: 0 bss_start, 1 bss_end, 2 data_flash_start, 3 data_start,
  //          4 data_end, 5 stack_top, 6 ram_fn
  function automatic void la(input logic [4:0] rd, input int sym);
    la_fix[text.size()] = sym;
    text.push_back(LUI(rd, 0));
    text.push_back(ADDI(rd, rd, 0));
  endfunction
  function automatic void label(input string n); lbl[n] = text.size(); endfunction
  function automatic void br(input logic [31:0] w, input string target);
    bfix.push_back('{text.size(), target});
    text.push_back(w);
  endfunction

  logic [31:0] sym_val [7];
  int ram_fn_ofs;

  task automatic build();
    // ---- start-up code
    la(T0, 0); la(T1, 1);
    br(BEQ(T0, T1, 0), "clear_bss_done");
    label("clear_bss");
    text.push_back(SW(ZERO, T0, 0));
    text.push_back(ADDI(T0, T0, 4));
    br(BNE(T0, T1, 0), "clear_bss");
    label("clear_bss_done");
    la(T0, 2); la(T1, 3); la(T2, 4);
    br(BEQ(T1, T2, 0), "copy_data_done");
    label("copy_data");
    text.push_back(LW(T3, T0, 0));
    text.push_back(SW(T3, T1, 0));
    text.push_back(ADDI(T0, T0, 4));
    text.push_back(ADDI(T1, T1, 4));
    br(BNE(T1, T2, 0), "copy_data");
    label("copy_data_done");
    la(SP, 5);
    br(JAL(RA, 0), "main");
    label("spin");
    text.push_back(JAL(ZERO, 0));
    // ---- main
    label("main");
    text.push_back(ADDI(SP, SP, -16));
    text.push_back(SW(RA, SP, 12));
    text.push_back(SW(S0, SP, 8));
    la(A0, 3);
    text.push_back(ADDI(A1, ZERO, NDATA));
    text.push_back(ADDI(S0, ZERO, 0));
    label("sum");
    text.push_back(LW(A2, A0, 0));
    text.push_back(ADD(S0, S0, A2));
    text.push_back(ADDI(A0, A0, 4));
    text.push_back(ADDI(A1, A1, -1));
    br(BNE(A1, ZERO, 0), "sum");
    la(S1, 0);
    text.push_back(SW(S0, S1, 0));
    text.push_back(LUI(A4, 32'h8000_0000));
    text.push_back(SW(S0, A4, 0));            // GPIO outputs
    text.push_back(LW(A2, A4, 4));            // GPIO inputs
    text.push_back(SW(A2, S1, 4));
    text.push_back(LUI(A5, 32'h8000_1000));   // UART
    text.push_back(ADDI(A0, ZERO, 32'h4F));    // 'O'
    br(JAL(RA, 0), "putc");
    text.push_back(ADDI(A0, ZERO, 32'h4B));    // 'K'
    br(JAL(RA, 0), "putc");
    text.push_back(CSRR(A2, 32'hC00));        // rdcycle
    text.push_back(SW(A2, S1, 8));
    text.push_back(CSRR(A2, 32'hC02));        // rdinstret
    text.push_back(SW(A2, S1, 12));
    text.push_back(ADDI(A2, ZERO, -2));
    text.push_back(SB(A2, S1, 17));
    text.push_back(LB(A1, S1, 17));
    text.push_back(SW(A1, S1, 20));
    // dependent loads straight from flash-resident code
    la(A0, 3);
    text.push_back(LW(A1, A0, 0));
    text.push_back(LW(A2, A0, 4));
    text.push_back(ADD(A3, A1, A2));
    text.push_back(SW(A3, S1, 28));
    text.push_back(LW(A1, A0, 8));
    text.push_back(ADDI(A2, A3, 1));
    text.push_back(XOR(A4, A2, A1));
    text.push_back(SW(A4, S1, 36));
    // receive one byte
    label("getc");
    text.push_back(LW(A1, A5, 4));
    text.push_back(ANDI(A1, A1, 2));
    br(BEQ(A1, ZERO, 0), "getc");
    text.push_back(LW(A2, A5, 0));
    text.push_back(SW(A2, S1, 32));
    // call the routine that lives in RAM
    la(T0, 6);
    la(A0, 3);
    text.push_back(JALR(RA, T0, 0));
    text.push_back(SW(A0, S1, 24));
    // unmapped address: answered with a bus error
    text.push_back(LUI(A1, 32'hC000_0000));
    text.push_back(LW(A2, A1, 0));
    text.push_back(LW(S0, SP, 8));
    text.push_back(LW(RA, SP, 12));
    text.push_back(ADDI(SP, SP, 16));
    text.push_back(JALR(ZERO, RA, 0));
    label("putc");
    text.push_back(LW(A1, A5, 4));
    text.push_back(ANDI(A1, A1, 1));
    br(BEQ(A1, ZERO, 0), "putc");
    text.push_back(SW(A0, A5, 0));
    text.push_back(JALR(ZERO, RA, 0));

    // ---- .data: an array, then a routine that runs from RAM
    for (int i = 0; i < NDATA; i++) begin
      dval[i] = $urandom;
      data.push_back(dval[i]);
    end
    ram_fn_ofs = 4 * data.size();
    data.push_back(LW(A1, A0, 0));
    data.push_back(LW(A2, A0, 4));
    data.push_back(ADD(A3, A1, A2));
    data.push_back(ADDI(A3, A3, 1));
    data.push_back(XOR(A4, A3, A1));
    data.push_back(SUB(A0, A4, A2));
    data.push_back(JALR(ZERO, RA, 0));

    // ---- link
    sym_val[2] = TEXT + 4 * text.size();
    sym_val[3] = RAM;
    sym_val[4] = RAM + 4 * data.size();
    sym_val[0] = sym_val[4];
    sym_val[1] = sym_val[0] + 4 * NBSS;
    sym_val[5] = STACK_TOP;
    sym_val[6] = RAM + ram_fn_ofs;
    foreach (la_fix[i]) begin
      logic [31:0] v = sym_val[la_fix[i]];
      text[i]     = LUI(text[i][11:7], hi20(v));
      text[i + 1] = ADDI(text[i][11:7], text[i][11:7], lo12(v));
    end
    foreach (bfix[k]) begin
      logic [31:0] w = text[bfix[k].idx];
      int off = 4 * (lbl[bfix[k].target] - bfix[k].idx);
      if (w[6:0] == 7'h6f) text[bfix[k].idx] = JAL(w[11:7], off);
      else text[bfix[k].idx] = enc_b(off, w[24:20], w[19:15], w[14:12]);
    end
    foreach (flash.mem[i]) flash.mem[i] = 8'hFF;
    foreach (text[i]) for (int b = 0; b < 4; b++) flash.mem[4 * i + b] = text[i][8 * b +: 8];
    foreach (data[i]) for (int b = 0; b < 4; b++) flash.mem[4 * (text.size() + i) + b] = data[i][8 * b +: 8];
  endtask

  // ------------------------------------------------------------ UART line
  logic [7:0] tx_bytes [$];
  initial begin
    forever begin
      logic [7:0] c;
      @(negedge uart_tx);
      repeat (BIT_CYCLES / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (BIT_CYCLES) @(posedge clk);
        c[i] = uart_tx;
      end
      repeat (BIT_CYCLES) @(posedge clk);
      if (uart_tx) tx_bytes.push_back(c);
    end
  end

  task automatic uart_send(input logic [7:0] c);
    logic [9:0] f = {1'b1, c, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rx = f[i];
      repeat (BIT_CYCLES) @(posedge clk);
    end
  endtask

  // ------------------------------------------------------------ mechanism counters
  int n_flush, n_interlock, n_byp_x, n_byp_m, n_mstall, n_conflict, n_ram_wr, n_periph, n_buserr, n_gpio_wr;
  always @(posedge clk) if (!rst) begin
    if (dut.u_soc.u_cpu.flush) n_flush++;
    if (dut.u_soc.u_cpu.hazard && !dut.u_soc.u_cpu.x_stall) n_interlock++;
    if (dut.u_soc.u_cpu.m_stall) n_mstall++;
    if (dut.u_soc.u_cpu.f_valid && !dut.u_soc.u_cpu.d_stall && dut.u_soc.u_cpu.d_ctrl.rs1_ren) begin
      if (dut.u_soc.u_cpu.dx.valid && dut.u_soc.u_cpu.dx.ctrl.rd_wen && dut.u_soc.u_cpu.dx.rd == dut.u_soc.u_cpu.d_rs1) n_byp_x++;
      else if (dut.u_soc.u_cpu.xm.valid && dut.u_soc.u_cpu.xm.ctrl.rd_wen && dut.u_soc.u_cpu.xm.rd == dut.u_soc.u_cpu.d_rs1) n_byp_m++;
    end
    if (dut.u_soc.ibus.cyc && dut.u_soc.dbus.cyc) n_conflict++;
    if (dut.u_soc.ram_bus.cyc && dut.u_soc.ram_bus.we && dut.u_soc.ram_bus.ack) n_ram_wr++;
    if (dut.u_soc.p_stb) n_periph++;
    if (dut.u_soc.sys.err) n_buserr++;
    if (dut.u_soc.p_sel[0] && dut.u_soc.p_we) n_gpio_wr++;
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycles_after_reset = 0;
  always @(posedge clk) if (!rst) cycles_after_reset++;
  always @(posedge clk) if (retire && $test$plusargs("trace")) $display("%0d retire pc=%h", cycles_after_reset, dut.u_soc.u_cpu.mw.pc);

  function automatic logic [31:0] ram_word(input logic [31:0] a);
    return dut.u_soc.u_ram.mem[(a - RAM) >> 2];
  endfunction

  initial begin
    logic [31:0] spin_pc, sum, bss;
    build();
    spin_pc = TEXT + 4 * lbl["spin"];
    repeat (4) @(posedge clk);
    rst = 0;
    fork
      begin
        repeat (2000) @(posedge clk);
        uart_send(RX_BYTE);
      end
    join_none
    // small logic examples, exercised while the processor runs
    for (int v = 0; v < 4; v++) begin
      {and_a, and_b} = 2'(v);
      #1 check(and_y == (v == 3), "AND gate truth table");
    end
    @(negedge clk) dff_d = 1;
    @(negedge clk) check(dff_q == 1 && dff_q_n == 0, "flip-flop captures 1");
    dff_r = 1;
    @(negedge clk) check(dff_q == 0, "flip-flop reset");
    dff_r = 0; dff_s = 1;
    @(negedge clk) check(dff_q == 1, "flip-flop set");
    dff_s = 0;

    // main has returned once the final spin loop retires
    do @(posedge clk); while (!(retire && dut.u_soc.u_cpu.mw.pc == spin_pc));
    repeat (20) @(posedge clk);
    // wait for the UART line to go quiet
    repeat (12 * BIT_CYCLES) @(posedge clk);

    sum = 0;
    foreach (dval[i]) sum += dval[i];
    bss = sym_val[0];
    check(ram_word(bss + 0) == sum, "sum of .data");
    check(ram_word(bss + 4) == 32'(GPIO_IN), "GPIO input read");
    check(ram_word(bss + 8) != 0 && ram_word(bss + 8) < 32'(cycles_after_reset), "cycle counter");
    check(ram_word(bss + 12) != 0 && ram_word(bss + 12) < ram_word(bss + 8), "instret counter");
    check(ram_word(bss + 16) == 32'h0000_FE00, "byte store lane");
    check(ram_word(bss + 20) == 32'hFFFF_FFFE, "signed byte load");
    check(ram_word(bss + 24) == (((dval[0] + dval[1] + 1) ^ dval[0]) - dval[1]), "routine run from RAM");
    check(ram_word(bss + 28) == dval[0] + dval[1], "load-use sum");
    check(ram_word(bss + 32) == 32'(RX_BYTE), "UART receive");
    check(ram_word(bss + 36) == ((dval[0] + dval[1] + 1) ^ dval[2]), "back-to-back dependence");
    for (int i = 10; i < NBSS; i++) check(ram_word(bss + 4 * i) == 0, $sformatf(".bss word %0d cleared", i));
    foreach (data[i]) check(ram_word(RAM + 4 * i) == data[i], $sformatf(".data word %0d copied", i));
    check(dut.u_soc.u_cpu.u_regs.regs[SP] == STACK_TOP, "stack pointer restored");
    check(gpio_out == sum[7:0], "GPIO outputs");
    check(tx_bytes.size() == 2 && tx_bytes[0] == 8'h4F && tx_bytes[1] == 8'h4B, "UART sent OK");
    check(dut.u_blinky.counter == 22'(cycles_after_reset), "blinky counter");
    check(led_r == dut.u_blinky.counter[21] && led_g == !led_r, "blinky LEDs");

    $display("cycles=%0d flash reads=%0d flush=%0d interlock=%0d bypass x/m=%0d/%0d mstall=%0d conflict=%0d ramwr=%0d periph=%0d buserr=%0d gpiowr=%0d uart tx=%0d",
             cycles_after_reset, flash.reads, n_flush, n_interlock, n_byp_x, n_byp_m, n_mstall, n_conflict,
             n_ram_wr, n_periph, n_buserr, n_gpio_wr, tx_bytes.size());
    check(flash.reads > 0, "no flash read");
    check(n_flush > 0, "no branch flush");
    check(n_interlock > 0, "no load-use interlock");
    check(n_byp_x > 0, "no bypass from Execute");
    check(n_byp_m > 0, "no bypass from Mem Access");
    check(n_mstall > 0, "no memory stall");
    check(n_conflict > 0, "no bus arbitration conflict");
    check(n_ram_wr > 0, "no RAM write");
    check(n_periph > 0, "no peripheral access");
    check(n_buserr > 0, "no bus error");
    check(n_gpio_wr > 0, "no GPIO write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
