// Execute stage: branch and jump target adder.
//
// Adds the immediate to the instruction's PC (branches and JAL) or to rs1
// (JALR, whose target then has bit 0 cleared as RV32I requires). Purely
// combinational; the target is registered into the mem-access stage.
//
// Follows the original: a separate target adder in Execute fed by RS1, PC and
// the immediate. Clearing bit 0 for JALR is the RISC-V rule.
module branch_target (
  input  logic        jalr,
  input  logic [31:0] pc,
  input  logic [31:0] rs1_rdata,
  input  logic [31:0] imm,
  output logic [31:0] target
);
  logic [31:0] sum;
  always_comb begin
    sum    = (jalr ? rs1_rdata : pc) + imm;
    target = {sum[31:1], sum[0] & ~jalr};
  end
endmodule
