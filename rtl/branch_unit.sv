// Mem-access stage: branch unit.
//
// Decides whether the instruction in the stage redirects the PC: always for
// JAL and JALR, and for a conditional branch when the ALU flags of rs1 - rs2
// meet the funct3 condition (BEQ zero, BNE not zero, BLT sign XOR overflow,
// BGE its inverse, BLTU borrow, BGEU no borrow). The core predicts every
// branch not taken, so a taken one flushes the younger instructions. Purely
// combinational.
//
// Follows the original: the branch unit sits in Mem Access and decides from
// the ALU flags whether a branch is taken. The mapping of each condition onto
// the flags is this design's.
module branch_unit
  import icicle_pkg::*;
(
  input  logic       valid,
  input  logic       branch,
  input  logic       jump,
  input  logic [2:0] funct3,
  input  flags_t     flags,
  output logic       taken
);
  logic cond;
  always_comb begin
    unique case (funct3)
      F3_BEQ:  cond = flags.zero;
      F3_BNE:  cond = !flags.zero;
      F3_BLT:  cond = flags.sign ^ flags.overflow;
      F3_BGE:  cond = !(flags.sign ^ flags.overflow);
      F3_BLTU: cond = flags.carry;
      F3_BGEU: cond = !flags.carry;
      default: cond = 1'b0;
    endcase
    taken = valid && (jump || (branch && cond));
  end
endmodule
