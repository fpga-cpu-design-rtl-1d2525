// Self-checking testbench of the Icicle core.
//
// Builds a random RV32I program (ALU register and immediate forms, loads and
// stores of every size, forward branches, JAL, AUIPC+JALR pairs, LUI, FENCE,
// with registers drawn from a small set so that back-to-back dependences and
// load-use pairs are frequent), wrapped in a backward-branch loop that runs
// the body several times. The core runs it against Wishbone memories that
// answer after a random number of cycles, while a reference model executes
// the same program: every retired instruction's register write is compared,
// then the final register file and data memory. The testbench also counts
// how often each pipeline mechanism occurred (flush on a taken branch,
// load-use interlock, memory stall, each bypass source) and fails if one
// never did.
module icicle_cpu_tb;
  import rv_asm_pkg::*;
  import rv32i_ref_pkg::*;

  localparam logic [31:0] RV = 32'h0010_0000;
  localparam int DATA_IDX = 32'h800;  // word index of 0x0010_2000
  localparam int NBODY = 300;
  localparam int LOOPS = 4;

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

  logic [29:0] ibus_adr, dbus_adr;
  logic [31:0] ibus_dat_w, dbus_dat_w, ibus_dat_r, dbus_dat_r;
  logic [3:0]  ibus_sel, dbus_sel;
  logic ibus_cyc, ibus_stb, ibus_we, ibus_ack, ibus_err;
  logic dbus_cyc, dbus_stb, dbus_we, dbus_ack, dbus_err;
  logic retire;

  icicle_cpu #(.RESET_VECTOR(RV)) dut (.*);

  logic [31:0] mem [MEM_WORDS];
  rv32i_ref iss;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------- memories
  // Both ports answer combinationally when their wait counter is zero, so
  // back-to-back transfers are possible; after each transfer a new random
  // wait of 0 to 2 cycles is drawn.
  int iwait, dwait;
  assign ibus_err   = 1'b0;
  assign dbus_err   = 1'b0;
  assign ibus_ack   = ibus_cyc && ibus_stb && iwait == 0;
  assign dbus_ack   = dbus_cyc && dbus_stb && dwait == 0;
  assign ibus_dat_r = mem[ibus_adr % MEM_WORDS];
  assign dbus_dat_r = mem[dbus_adr % MEM_WORDS];
  always @(posedge clk) begin
    if (ibus_ack) iwait <= ($urandom % 4 == 0) ? $urandom_range(1, 2) : 0;
    else if (ibus_cyc && iwait > 0) iwait <= iwait - 1;
    if (dbus_ack) begin
      dwait <= ($urandom % 3 == 0) ? $urandom_range(1, 2) : 0;
      if (dbus_we)
        for (int i = 0; i < 4; i++)
          if (dbus_sel[i]) mem[dbus_adr % MEM_WORDS][8*i +: 8] <= dbus_dat_w[8*i +: 8];
    end else if (dbus_cyc && dwait > 0) dwait <= dwait - 1;
  end

  // ---------------------------------------------------------- program
  logic [31:0] prog [$];
  bit          protect [int];   // indices of JALR halves of AUIPC/JALR pairs
  int          fixup [int];     // index -> kind of forward transfer to patch

  function automatic logic [4:0] rr();
    return 5'($urandom_range(1, 7));
  endfunction

  task automatic gen_program();
    int body_start, n, off;
    logic [31:0] v;
    for (int r = 1; r <= 7; r++) begin
      v = $urandom;
      prog.push_back(LUI(5'(r), hi20(v)));
      prog.push_back(ADDI(5'(r), 5'(r), lo12(v)));
    end
    prog.push_back(LUI(5'd8, 32'h0010_2000));
    prog.push_back(ADDI(5'd11, 5'd0, LOOPS));
    body_start = prog.size();
    for (int k = 0; k < NBODY; k++) begin
      int kind = $urandom % 100;
      logic [4:0] rd = ($urandom % 20 == 0) ? 5'd0 : rr();
      if (kind < 25) begin
        case ($urandom % 10)
          0: prog.push_back(ADD(rd, rr(), rr()));   1: prog.push_back(SUB(rd, rr(), rr()));
          2: prog.push_back(SLL(rd, rr(), rr()));   3: prog.push_back(SLT(rd, rr(), rr()));
          4: prog.push_back(SLTU(rd, rr(), rr()));  5: prog.push_back(XOR(rd, rr(), rr()));
          6: prog.push_back(SRL(rd, rr(), rr()));   7: prog.push_back(SRA(rd, rr(), rr()));
          8: prog.push_back(OR(rd, rr(), rr()));    default: prog.push_back(AND(rd, rr(), rr()));
        endcase
      end else if (kind < 45) begin
        int imm = int'($urandom_range(0, 4095)) - 2048;
        case ($urandom % 9)
          0: prog.push_back(ADDI(rd, rr(), imm));   1: prog.push_back(SLTI(rd, rr(), imm));
          2: prog.push_back(SLTIU(rd, rr(), imm));  3: prog.push_back(XORI(rd, rr(), imm));
          4: prog.push_back(ORI(rd, rr(), imm));    5: prog.push_back(ANDI(rd, rr(), imm));
          6: prog.push_back(SLLI(rd, rr(), imm));   7: prog.push_back(SRLI(rd, rr(), imm));
          default: prog.push_back(SRAI(rd, rr(), imm));
        endcase
      end else if (kind < 62) begin
        case ($urandom % 5)
          0: prog.push_back(LW(rd, 5'd8, 4 * ($urandom % 64)));
          1: prog.push_back(LH(rd, 5'd8, 2 * ($urandom % 128)));
          2: prog.push_back(LHU(rd, 5'd8, 2 * ($urandom % 128)));
          3: prog.push_back(LB(rd, 5'd8, $urandom % 256));
          default: prog.push_back(LBU(rd, 5'd8, $urandom % 256));
        endcase
        if ($urandom % 2) prog.push_back(ADD(rr(), rd, rr()));  // load-use
      end else if (kind < 74) begin
        case ($urandom % 3)
          0: prog.push_back(SW(rr(), 5'd8, 4 * ($urandom % 64)));
          1: prog.push_back(SH(rr(), 5'd8, 2 * ($urandom % 128)));
          default: prog.push_back(SB(rr(), 5'd8, $urandom % 256));
        endcase
      end else if (kind < 86) begin
        off = 4 * $urandom_range(1, 4);
        fixup[prog.size()] = 1;
        case ($urandom % 6)
          0: prog.push_back(BEQ(rr(), rr(), off));   1: prog.push_back(BNE(rr(), rr(), off));
          2: prog.push_back(BLT(rr(), rr(), off));   3: prog.push_back(BGE(rr(), rr(), off));
          4: prog.push_back(BLTU(rr(), rr(), off));  default: prog.push_back(BGEU(rr(), rr(), off));
        endcase
      end else if (kind < 90) begin
        fixup[prog.size()] = 2;
        prog.push_back(JAL(rd, 4 * $urandom_range(1, 3)));
      end else if (kind < 94) begin
        fixup[prog.size()] = 3;
        prog.push_back(AUIPC(5'd9, 32'd0));
        protect[prog.size()] = 1;
        prog.push_back(JALR(5'd10, 5'd9, 4 * $urandom_range(2, 4)));
      end else if (kind < 98) begin
        if ($urandom % 2) prog.push_back(LUI(rd, $urandom));
        else              prog.push_back(AUIPC(rd, $urandom));
      end else begin
        prog.push_back(FENCE());
      end
    end
    repeat (4) prog.push_back(NOP());
    prog.push_back(ADDI(5'd11, 5'd11, -1));
    n = prog.size();
    prog.push_back(BNE(5'd11, 5'd0, 4 * (body_start - n)));
    prog.push_back(JAL(5'd0, 0));
    // keep forward transfers off the JALR half of a pair
    foreach (fixup[i]) begin
      logic [31:0] w = prog[i];
      int t;
      if (fixup[i] == 1) begin
        t = i + int'($signed({w[31], w[7], w[30:25], w[11:8], 1'b0})) / 4;
        if (protect.exists(t)) prog[i] = enc_b(4 * (t + 1 - i), w[24:20], w[19:15], w[14:12]);
      end else if (fixup[i] == 2) begin
        t = i + int'($signed({w[31], w[19:12], w[20], w[30:21], 1'b0})) / 4;
        if (protect.exists(t)) prog[i] = JAL(w[11:7], 4 * (t + 1 - i));
      end else begin
        w = prog[i + 1];
        t = i + int'($signed(w[31:20])) / 4;
        if (protect.exists(t)) prog[i + 1] = JALR(w[11:7], w[19:15], 4 * (t + 1 - i));
      end
    end
  endtask

  // ---------------------------------------------------------- retire compare
  int n_retired = 0;
  bit done = 0;
  always @(posedge clk) begin
    if (!rst && retire && !done) begin
      logic wen; logic [4:0] rd; logic [31:0] val;
      iss.step(wen, rd, val);
      n_retired++;
      check(dut.rf_wen == wen, $sformatf("retire %0d: write enable %b, expected %b", n_retired, dut.rf_wen, wen));
      if (wen)
        check(dut.mw.rd == rd && dut.w_wdata == val,
              $sformatf("retire %0d: x%0d=%h, expected x%0d=%h", n_retired, dut.mw.rd, dut.w_wdata, rd, val));
    end
  end

  // ---------------------------------------------------------- mechanism counters
  int n_flush, n_interlock, n_mstall, n_byp_x, n_byp_m, n_byp_w, n_byp_lw, n_fetch_wait;
  always @(posedge clk) if (!rst) begin
    logic [4:0] r1;
    r1 = dut.d_rs1;
    if (dut.flush) n_flush++;
    if (dut.hazard && !dut.x_stall) n_interlock++;
    if (dut.m_stall) n_mstall++;
    if (dut.ibus_cyc && !dut.f_valid) n_fetch_wait++;
    if (dut.f_valid && !dut.d_stall && dut.d_ctrl.rs1_ren) begin
      if (dut.dx.valid && dut.dx.ctrl.rd_wen && dut.dx.rd == r1) n_byp_x++;
      else if (dut.xm.valid && dut.xm.ctrl.rd_wen && dut.xm.rd == r1) n_byp_m++;
      else if (dut.mw.valid && dut.mw.rd_wen && dut.mw.rd == r1) n_byp_w++;
      else if (dut.lw_valid && dut.lw_rd == r1) n_byp_lw++;
    end
  end

  // ---------------------------------------------------------- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] first_fetch;
  bit          seen_fetch = 0;
  always @(posedge clk) if (!rst && ibus_cyc && !seen_fetch) begin
    seen_fetch  <= 1;
    first_fetch <= {ibus_adr, 2'b00};
  end

  initial begin
    int loop_pc;
    iss = new(RV);
    foreach (mem[i]) mem[i] = $urandom;
    gen_program();
    foreach (prog[i]) mem[i] = prog[i];
    foreach (mem[i]) iss.mem[i] = mem[i];
    loop_pc = RV + 4 * (prog.size() - 1);
    iwait = 0; dwait = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    while (iss.pc != loop_pc) @(posedge clk);
    repeat (20) @(posedge clk);
    done = 1;
    check(first_fetch == RV, $sformatf("first fetch at %h", first_fetch));
    for (int r = 1; r < 12; r++)
      check(dut.u_regs.regs[r] == iss.x[r], $sformatf("final x%0d %h vs %h", r, dut.u_regs.regs[r], iss.x[r]));
    for (int i = DATA_IDX; i < DATA_IDX + 64; i++)
      check(mem[i] == iss.mem[i], $sformatf("data word %0d", i));
    check(dut.instret_cnt == 64'(n_retired), "instret counter");
    $display("retired=%0d flush=%0d interlock=%0d mstall=%0d fetchwait=%0d bypass x/m/w/lw=%0d/%0d/%0d/%0d",
             n_retired, n_flush, n_interlock, n_mstall, n_fetch_wait, n_byp_x, n_byp_m, n_byp_w, n_byp_lw);
    check(n_flush > 0, "no taken branch flush seen");
    check(n_interlock > 0, "no load-use interlock seen");
    check(n_mstall > 0, "no memory stall seen");
    check(n_byp_x > 0 && n_byp_m > 0 && n_byp_w > 0 && n_byp_lw > 0, "a bypass source never used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
