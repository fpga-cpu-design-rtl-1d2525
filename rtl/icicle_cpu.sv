// Icicle: a six-stage, in-order RV32I pipeline with Wishbone instruction and
// data ports.
//
// Stages: PC Gen (PC register, +4, PC mux), Fetch (instruction load unit),
// Decode (control unit, immediate decoder, register file), Execute (A and B
// operand muxes, ALU, branch target adder), Mem Access (load/store unit and
// branch unit) and Writeback (result mux into the register file). Each stage
// hands a record with a valid bit to the next through a pipeline register.
//
// Branches are predicted not taken: PC Gen keeps fetching PC+4 and a branch
// or jump is resolved in Mem Access from the flags the ALU registered. A taken
// one loads the target into the PC and flushes the three younger instructions
// (in Fetch, Decode and Execute), costing three slots.
//
// Data hazards are handled by bypassing into the Decode -> Execute register:
// an operand comes from, in order of priority, the ALU output of the
// instruction in Execute, the result (or load data) in Mem Access, the value
// in Writeback, the value written on the previous clock edge (the register
// file's read ports are not transparent) and finally the register file. A
// load whose result is needed by the very next instruction interlocks Decode
// (a bubble goes into Execute) until the load's data is on the bus. Mem Access stalls the stages
// behind it while a data bus access waits for ack, but an empty Execute stage
// still takes the next instruction, so bubbles are squeezed out during a
// stall. Fetch waits for its own bus without stalling the stages in front of
// it.
//
// The read-only counters cycle, time (= cycle) and instret, 64 bits each, are
// read with CSRRS (RDCYCLE and friends). instret counts instructions leaving
// Writeback. FENCE, FENCE.I, ECALL and EBREAK execute as no-operations; there
// are no traps or interrupts.
//
// The stage structure, the non-transparent register file, the PC reset value
// of RESET_VECTOR - 4 and the decode rules follow the design; the flush and
// bypass details, the counters' implementation and the treatment of SYSTEM
// instructions are this implementation's choices.
module icicle_cpu
  import icicle_pkg::*;
#(
  parameter logic [31:0] RESET_VECTOR = RESET_VECTOR_DEFAULT
) (
  input  logic        clk,
  input  logic        rst,
  // instruction bus (Wishbone classic, read only)
  output logic [29:0] ibus_adr,
  output logic [31:0] ibus_dat_w,
  output logic [3:0]  ibus_sel,
  output logic        ibus_cyc,
  output logic        ibus_stb,
  output logic        ibus_we,
  input  logic [31:0] ibus_dat_r,
  input  logic        ibus_ack,
  input  logic        ibus_err,
  // data bus (Wishbone classic)
  output logic [29:0] dbus_adr,
  output logic [31:0] dbus_dat_w,
  output logic [3:0]  dbus_sel,
  output logic        dbus_cyc,
  output logic        dbus_stb,
  output logic        dbus_we,
  input  logic [31:0] dbus_dat_r,
  input  logic        dbus_ack,
  input  logic        dbus_err,
  // retirement of an instruction (one pulse per instruction leaving Writeback)
  output logic        retire
);
  // ---------------------------------------------------------------- control
  logic flush, m_stall, x_stall, d_stall, hazard;

  // ---------------------------------------------------------------- PC Gen
  logic [31:0] pf_pc;
  logic        pf_valid, pf_advance;
  xm_t         xm;

  pc_gen #(.RESET_VECTOR(RESET_VECTOR)) u_pc_gen (
    .clk, .rst,
    .advance      (pf_advance),
    .branch_taken (flush),
    .branch_target(xm.branch_target),
    .pc           (pf_pc),
    .pc_valid     (pf_valid)
  );

  // ---------------------------------------------------------------- Fetch
  logic        f_valid;
  logic [31:0] f_pc, f_insn, next_insn;

  assign ibus_dat_w = '0;
  assign ibus_sel   = 4'b1111;
  assign ibus_we    = 1'b0;

  fetch_unit u_fetch (
    .clk, .rst,
    .pf_pc, .pf_valid, .pf_advance,
    .flush, .d_stall,
    .ibus_adr, .ibus_cyc, .ibus_stb, .ibus_dat_r, .ibus_ack, .ibus_err,
    .f_valid, .f_pc, .f_insn, .next_insn
  );

  // ---------------------------------------------------------------- Decode
  ctrl_t       d_ctrl;
  logic [31:0] d_imm;
  logic [4:0]  d_rs1, d_rs2;
  logic [31:0] rf_rs1, rf_rs2, d_rs1_val, d_rs2_val;
  dx_t         dx;
  mw_t         mw;
  logic        rf_wen;
  logic [31:0] w_wdata;
  logic        lw_valid;
  logic [4:0]  lw_rd;
  logic [31:0] lw_data;
  logic [31:0] x_result, m_rdata, m_wdata;

  assign d_rs1 = f_insn[19:15];
  assign d_rs2 = f_insn[24:20];

  control_unit u_control (.insn(f_insn), .ctrl(d_ctrl));
  imm_decoder  u_imm     (.insn(f_insn), .fmt(d_ctrl.fmt), .imm(d_imm));

  register_file u_regs (
    .clk,
    .rs1_addr (next_insn[19:15]),
    .rs2_addr (next_insn[24:20]),
    .rs1_rdata(rf_rs1),
    .rs2_rdata(rf_rs2),
    .rd_en    (rf_wen),
    .rd_addr  (mw.rd),
    .rd_wdata (w_wdata)
  );

  // bypass network
  function automatic logic [31:0] bypass(input logic [4:0] rs, input logic [31:0] rf_val);
    if (rs == 5'd0)                                  return 32'd0;
    if (dx.valid && dx.ctrl.rd_wen && dx.rd == rs)   return x_result;
    if (xm.valid && xm.ctrl.rd_wen && xm.rd == rs)   return m_wdata;
    if (mw.valid && mw.rd_wen && mw.rd == rs)        return w_wdata;
    if (lw_valid && lw_rd == rs)                     return lw_data;
    return rf_val;
  endfunction

  // Load data is not available to bypass until the load's bus cycle ends:
  // wait while the load is in Execute, or in Mem Access still stalled.
  logic x_load_rs1, x_load_rs2, m_load_rs1, m_load_rs2;
  assign x_load_rs1 = dx.valid && dx.ctrl.load && dx.ctrl.rd_wen && dx.rd == d_rs1;
  assign x_load_rs2 = dx.valid && dx.ctrl.load && dx.ctrl.rd_wen && dx.rd == d_rs2;
  assign m_load_rs1 = m_stall && xm.ctrl.load && xm.ctrl.rd_wen && xm.rd == d_rs1;
  assign m_load_rs2 = m_stall && xm.ctrl.load && xm.ctrl.rd_wen && xm.rd == d_rs2;
  assign hazard     = f_valid && ((d_ctrl.rs1_ren && (x_load_rs1 || m_load_rs1)) ||
                                  (d_ctrl.rs2_ren && (x_load_rs2 || m_load_rs2)));

  assign d_rs1_val = bypass(d_rs1, rf_rs1);
  assign d_rs2_val = bypass(d_rs2, rf_rs2);

  // Execute only stalls when it holds an instruction: a bubble is overwritten.
  assign x_stall = m_stall && dx.valid;
  assign d_stall = x_stall || hazard;

  always_ff @(posedge clk) begin
    if (rst) begin
      dx <= '0;
    end else if (flush) begin
      dx.valid <= 1'b0;
    end else if (!x_stall) begin
      dx.valid     <= f_valid && !hazard;
      dx.pc        <= f_pc;
      dx.ctrl      <= d_ctrl;
      dx.funct3    <= f_insn[14:12];
      dx.rd        <= f_insn[11:7];
      dx.csr_addr  <= f_insn[31:20];
      dx.rs1_rdata <= d_rs1_val;
      dx.rs2_rdata <= d_rs2_val;
      dx.imm       <= d_imm;
    end
  end

  // ---------------------------------------------------------------- Execute
  logic [31:0] x_a, x_b, x_target, csr_rdata;
  flags_t      x_flags;
  logic [63:0] cycle_cnt, instret_cnt;

  operand_mux u_opmux (
    .a_sel(dx.ctrl.a_sel), .b_sel(dx.ctrl.b_sel),
    .pc(dx.pc), .rs1_rdata(dx.rs1_rdata), .rs2_rdata(dx.rs2_rdata), .imm(dx.imm),
    .a(x_a), .b(x_b)
  );

  always_comb begin
    unique case (dx.csr_addr)
      CSR_CYCLE, CSR_TIME:   csr_rdata = cycle_cnt[31:0];
      CSR_CYCLEH, CSR_TIMEH: csr_rdata = cycle_cnt[63:32];
      CSR_INSTRET:           csr_rdata = instret_cnt[31:0];
      CSR_INSTRETH:          csr_rdata = instret_cnt[63:32];
      default:               csr_rdata = '0;
    endcase
  end

  alu u_alu (
    .a(x_a), .b(x_b),
    .add_sub    (dx.ctrl.add_sub),
    .sub_cmp    (dx.ctrl.sub_cmp),
    .logic_op   (dx.ctrl.logic_op),
    .shift_right(dx.ctrl.shift_right),
    .shift_arith(dx.ctrl.shift_arith),
    .result_sel (dx.ctrl.result_sel),
    .csr_rdata,
    .result     (x_result),
    .flags      (x_flags)
  );

  branch_target u_btarget (
    .jalr(dx.ctrl.jalr), .pc(dx.pc), .rs1_rdata(dx.rs1_rdata), .imm(dx.imm),
    .target(x_target)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      xm <= '0;
    end else if (!m_stall) begin
      xm.valid         <= dx.valid && !flush;
      xm.pc            <= dx.pc;
      xm.ctrl          <= dx.ctrl;
      xm.funct3        <= dx.funct3;
      xm.rd            <= dx.rd;
      xm.result        <= x_result;
      xm.flags         <= x_flags;
      xm.branch_target <= x_target;
      xm.rs2_rdata     <= dx.rs2_rdata;
    end
  end

  // ---------------------------------------------------------------- Mem Access
  branch_unit u_branch (
    .valid(xm.valid), .branch(xm.ctrl.branch), .jump(xm.ctrl.jump),
    .funct3(xm.funct3), .flags(xm.flags), .taken(flush)
  );

  load_store_unit u_lsu (
    .clk, .rst,
    .valid(xm.valid), .load(xm.ctrl.load), .store(xm.ctrl.store),
    .funct3(xm.funct3), .addr(xm.result), .wdata(xm.rs2_rdata),
    .rdata(m_rdata), .busy(m_stall),
    .dbus_adr, .dbus_dat_w, .dbus_sel, .dbus_cyc, .dbus_stb, .dbus_we,
    .dbus_dat_r, .dbus_ack, .dbus_err
  );

  assign m_wdata = xm.ctrl.load ? m_rdata : xm.result;

  always_ff @(posedge clk) begin
    if (rst) begin
      mw <= '0;
    end else begin
      mw.valid     <= xm.valid && !m_stall;
      mw.pc        <= xm.pc;
      mw.rd        <= xm.rd;
      mw.rd_wen    <= xm.ctrl.rd_wen;
      mw.wdata_sel <= xm.ctrl.wdata_sel;
      mw.result    <= xm.result;
      mw.mem_rdata <= m_rdata;
    end
  end

  // ---------------------------------------------------------------- Writeback
  wdata_mux u_wdata_mux (
    .sel(mw.wdata_sel), .result(mw.result), .mem_rdata(mw.mem_rdata), .rd_wdata(w_wdata)
  );

  assign rf_wen = mw.valid && mw.rd_wen;
  assign retire = mw.valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      lw_valid    <= 1'b0;
      lw_rd       <= '0;
      lw_data     <= '0;
      cycle_cnt   <= '0;
      instret_cnt <= '0;
    end else begin
      lw_valid  <= rf_wen;
      lw_rd     <= mw.rd;
      lw_data   <= w_wdata;
      cycle_cnt <= cycle_cnt + 64'd1;
      if (mw.valid) instret_cnt <= instret_cnt + 64'd1;
    end
  end
endmodule
