// Decode stage: control unit.
//
// Maps the opcode to an instruction format (U for LUI and AUIPC, J for JAL,
// I for JALR, loads, OP-IMM and SYSTEM, B for branches, S for stores, R for
// OP) and derives the register enables from it: rd is written for R, I, U and
// J formats, rs1 is read for R, I, S and B, rs2 for R, S and B, each only when
// the register number is not x0. It also sets the operand selects, the ALU
// function, the write-back source and the branch, jump, load, store and
// counter-read flags. FENCE, FENCE.I, ECALL and EBREAK decode as no-operations
// and so does any opcode outside RV32I (flagged as illegal). SYSTEM
// instructions other than CSRRS (the RDCYCLE family) are also no-operations.
// Purely combinational.
//
// Follows the original: the format per opcode, the rules deriving
// rd_wen/rs1_ren/rs2_ren from the format, and add_sub from funct7 bit 5 for OP
// only. Own choices: the remaining controls, the zero and 4 operand selects,
// and treating FENCE, FENCE.I, ECALL, EBREAK and unknown opcodes as no-ops.
module control_unit
  import icicle_pkg::*;
(
  input  logic [31:0] insn,
  output ctrl_t       ctrl
);
  logic [6:0] opcode;
  logic [2:0] funct3;
  logic [6:0] funct7;
  logic [4:0] rd, rs1, rs2;
  logic       fmt_rd, fmt_rs1, fmt_rs2, no_write;

  assign opcode = insn[6:0];
  assign rd     = insn[11:7];
  assign funct3 = insn[14:12];
  assign rs1    = insn[19:15];
  assign rs2    = insn[24:20];
  assign funct7 = insn[31:25];

  always_comb begin
    ctrl            = '0;
    ctrl.fmt        = FMT_I;
    ctrl.a_sel      = A_RS1;
    ctrl.b_sel      = B_IMM;
    ctrl.result_sel = RES_ADDER;
    ctrl.logic_op   = LOGIC_XOR;
    ctrl.wdata_sel  = WD_ALU_RESULT;
    no_write        = 1'b0;

    unique case (opcode)
      OP_LUI: begin
        ctrl.fmt   = FMT_U;
        ctrl.a_sel = A_ZERO;
      end
      OP_AUIPC: begin
        ctrl.fmt   = FMT_U;
        ctrl.a_sel = A_PC;
      end
      OP_JAL: begin
        ctrl.fmt   = FMT_J;
        ctrl.a_sel = A_PC;
        ctrl.b_sel = B_FOUR;
        ctrl.jump  = 1'b1;
      end
      OP_JALR: begin
        ctrl.fmt   = FMT_I;
        ctrl.a_sel = A_PC;
        ctrl.b_sel = B_FOUR;
        ctrl.jump  = 1'b1;
        ctrl.jalr  = 1'b1;
      end
      OP_BRANCH: begin
        ctrl.fmt     = FMT_B;
        ctrl.b_sel   = B_RS2;
        ctrl.add_sub = 1'b1;
        ctrl.branch  = 1'b1;
      end
      OP_LOAD: begin
        ctrl.fmt       = FMT_I;
        ctrl.load      = 1'b1;
        ctrl.wdata_sel = WD_MEM_RDATA;
      end
      OP_STORE: begin
        ctrl.fmt   = FMT_S;
        ctrl.store = 1'b1;
      end
      OP_OP_IMM, OP_OP: begin
        ctrl.fmt   = (opcode == OP_OP) ? FMT_R : FMT_I;
        ctrl.b_sel = (opcode == OP_OP) ? B_RS2 : B_IMM;
        unique case (funct3)
          F3_ADD_SUB: begin
            ctrl.result_sel = RES_ADDER;
            ctrl.add_sub    = (opcode == OP_OP) ? funct7[5] : 1'b0;
          end
          F3_SLT, F3_SLTU: begin
            ctrl.result_sel = RES_SLT;
            ctrl.add_sub    = 1'b1;
            ctrl.sub_cmp    = (funct3 == F3_SLT);
          end
          F3_XOR: begin ctrl.result_sel = RES_LOGIC; ctrl.logic_op = LOGIC_XOR; end
          F3_OR:  begin ctrl.result_sel = RES_LOGIC; ctrl.logic_op = LOGIC_OR;  end
          F3_AND: begin ctrl.result_sel = RES_LOGIC; ctrl.logic_op = LOGIC_AND; end
          F3_SLL: begin ctrl.result_sel = RES_SHIFT; end
          default: begin  // F3_SRL_SRA
            ctrl.result_sel  = RES_SHIFT;
            ctrl.shift_right = 1'b1;
            ctrl.shift_arith = funct7[5];
          end
        endcase
      end
      OP_SYSTEM: begin
        ctrl.fmt = FMT_I;
        if (funct3 == F3_CSRRS) begin
          ctrl.csr        = 1'b1;
          ctrl.result_sel = RES_CSR;
        end else begin
          no_write = 1'b1;
        end
      end
      OP_MISC_MEM: begin
        ctrl.fmt = FMT_I;
        no_write = 1'b1;
      end
      default: begin
        ctrl.illegal = 1'b1;
        no_write     = 1'b1;
      end
    endcase

    fmt_rd  = ctrl.fmt inside {FMT_R, FMT_I, FMT_U, FMT_J};
    fmt_rs1 = ctrl.fmt inside {FMT_R, FMT_I, FMT_S, FMT_B};
    fmt_rs2 = ctrl.fmt inside {FMT_R, FMT_S, FMT_B};
    ctrl.rd_wen  = (rd != 5'd0) && fmt_rd && !no_write;
    ctrl.rs1_ren = (rs1 != 5'd0) && fmt_rs1 && !no_write && !(opcode == OP_SYSTEM);
    ctrl.rs2_ren = (rs2 != 5'd0) && fmt_rs2;
  end
endmodule
