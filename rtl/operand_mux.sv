// Execute stage: the A and B operand multiplexers in front of the ALU.
//
// A is rs1, the instruction's PC, or zero (for LUI). B is rs2, the immediate,
// or the constant 4 (the return address PC+4 of JAL and JALR). Purely
// combinational.
//
// Follows the original: the A mux chooses rs1 or PC and the B mux chooses rs2
// or the immediate. The zero and 4 inputs are this design's additions, for LUI
// and the link address.
module operand_mux
  import icicle_pkg::*;
(
  input  a_sel_e      a_sel,
  input  b_sel_e      b_sel,
  input  logic [31:0] pc,
  input  logic [31:0] rs1_rdata,
  input  logic [31:0] rs2_rdata,
  input  logic [31:0] imm,
  output logic [31:0] a,
  output logic [31:0] b
);
  always_comb begin
    unique case (a_sel)
      A_RS1:   a = rs1_rdata;
      A_PC:    a = pc;
      default: a = '0;
    endcase
    unique case (b_sel)
      B_RS2:   b = rs2_rdata;
      B_IMM:   b = imm;
      default: b = 32'd4;
    endcase
  end
endmodule
