// Testbench of the control unit: one instruction of every RV32I kind, with
// random registers, is decoded and its format, register enables, operand
// selects, ALU function and flags compared with a table written here from the
// instruction set definition.
module control_unit_tb;
  import icicle_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] insn;
  ctrl_t c;
  int checks = 0, failures = 0;
  control_unit dut (.insn, .ctrl(c));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s (insn %h)", what, insn); end
  endtask

  // checks the fields every instruction has
  task automatic common(input fmt_e fmt, input bit wr, r1, r2, input logic [4:0] rd, rs1, rs2);
    #1;
    chk(c.fmt == fmt, "format");
    chk(c.rd_wen == (wr && rd != 0), "rd_wen");
    chk(c.rs1_ren == (r1 && rs1 != 0), "rs1_ren");
    chk(c.rs2_ren == (r2 && rs2 != 0), "rs2_ren");
  endtask

  initial begin
    logic [4:0] rd, rs1, rs2;
    for (int i = 0; i < 100; i++) begin
      rd = (i % 10 == 0) ? 5'd0 : 5'($urandom); rs1 = (i % 7 == 0) ? 5'd0 : 5'($urandom); rs2 = 5'($urandom);
      insn = LUI(rd, $urandom);   common(FMT_U, 1, 0, 0, rd, rs1, rs2); chk(c.a_sel == A_ZERO && c.b_sel == B_IMM && c.result_sel == RES_ADDER && !c.add_sub, "lui");
      insn = AUIPC(rd, $urandom); common(FMT_U, 1, 0, 0, rd, rs1, rs2); chk(c.a_sel == A_PC && c.b_sel == B_IMM, "auipc");
      insn = JAL(rd, 64);         common(FMT_J, 1, 0, 0, rd, rs1, rs2); chk(c.jump && !c.jalr && c.a_sel == A_PC && c.b_sel == B_FOUR, "jal");
      insn = JALR(rd, rs1, 8);    common(FMT_I, 1, 1, 0, rd, rs1, rs2); chk(c.jump && c.jalr && c.b_sel == B_FOUR, "jalr");
      insn = BLT(rs1, rs2, 16);   common(FMT_B, 0, 1, 1, rd, rs1, rs2); chk(c.branch && c.add_sub && c.b_sel == B_RS2 && !c.jump, "branch");
      insn = LH(rd, rs1, 4);      common(FMT_I, 1, 1, 0, rd, rs1, rs2); chk(c.load && !c.store && c.wdata_sel == WD_MEM_RDATA && c.b_sel == B_IMM, "load");
      insn = SW(rs2, rs1, 4);     common(FMT_S, 0, 1, 1, rd, rs1, rs2); chk(c.store && !c.load && c.b_sel == B_IMM && !c.add_sub, "store");
      insn = ADDI(rd, rs1, -5);   common(FMT_I, 1, 1, 0, rd, rs1, rs2); chk(c.result_sel == RES_ADDER && !c.add_sub && c.b_sel == B_IMM && c.wdata_sel == WD_ALU_RESULT, "addi");
      insn = ADD(rd, rs1, rs2);   common(FMT_R, 1, 1, 1, rd, rs1, rs2); chk(c.result_sel == RES_ADDER && !c.add_sub && c.b_sel == B_RS2, "add");
      insn = SUB(rd, rs1, rs2);   common(FMT_R, 1, 1, 1, rd, rs1, rs2); chk(c.result_sel == RES_ADDER && c.add_sub, "sub");
      insn = SLT(rd, rs1, rs2);   common(FMT_R, 1, 1, 1, rd, rs1, rs2); chk(c.result_sel == RES_SLT && c.add_sub && c.sub_cmp, "slt");
      insn = SLTIU(rd, rs1, 3);   common(FMT_I, 1, 1, 0, rd, rs1, rs2); chk(c.result_sel == RES_SLT && c.add_sub && !c.sub_cmp, "sltiu");
      insn = XORI(rd, rs1, 3);    common(FMT_I, 1, 1, 0, rd, rs1, rs2); chk(c.result_sel == RES_LOGIC && c.logic_op == LOGIC_XOR, "xori");
      insn = OR(rd, rs1, rs2);    common(FMT_R, 1, 1, 1, rd, rs1, rs2); chk(c.result_sel == RES_LOGIC && c.logic_op == LOGIC_OR, "or");
      insn = ANDI(rd, rs1, 3);    common(FMT_I, 1, 1, 0, rd, rs1, rs2); chk(c.result_sel == RES_LOGIC && c.logic_op == LOGIC_AND, "andi");
      insn = SLL(rd, rs1, rs2);   common(FMT_R, 1, 1, 1, rd, rs1, rs2); chk(c.result_sel == RES_SHIFT && !c.shift_right, "sll");
      insn = SRLI(rd, rs1, 3);    common(FMT_I, 1, 1, 0, rd, rs1, rs2); chk(c.result_sel == RES_SHIFT && c.shift_right && !c.shift_arith, "srli");
      insn = SRA(rd, rs1, rs2);   common(FMT_R, 1, 1, 1, rd, rs1, rs2); chk(c.result_sel == RES_SHIFT && c.shift_right && c.shift_arith, "sra");
      insn = CSRR(rd, 32'hC00);   #1 chk(c.csr && c.result_sel == RES_CSR && c.rd_wen == (rd != 0) && !c.rs1_ren, "rdcycle");
      insn = FENCE();             #1 chk(!c.rd_wen && !c.load && !c.store && !c.jump && !c.branch, "fence");
      insn = 32'h0000_0073;       #1 chk(!c.rd_wen && !c.csr, "ecall");
      insn = {$urandom, 7'h7F} & 32'hFFFF_FFFF; #1 chk(c.illegal && !c.rd_wen, "illegal opcode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
