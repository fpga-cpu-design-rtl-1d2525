// Decode stage: immediate decoder.
//
// Extracts and sign-extends the immediate of an instruction for the format
// chosen by the control unit: I (bits 31:20), S (31:25 and 11:7), B (31, 7,
// 30:25, 11:8, with a zero bit 0), U (31:12 in the top bits) and J (31,
// 19:12, 20, 30:21, with a zero bit 0). R-type instructions have no
// immediate and give zero. Purely combinational.
//
// The bit layouts follow the original decoder and the RISC-V formats; the zero
// for R-type is this design's choice.
module imm_decoder
  import icicle_pkg::*;
(
  input  logic [31:0] insn,
  input  fmt_e        fmt,
  output logic [31:0] imm
);
  logic [31:0] imm_i, imm_s, imm_b, imm_u, imm_j;

  always_comb begin
    imm_i = {{21{insn[31]}}, insn[30:20]};
    imm_s = {{21{insn[31]}}, insn[30:25], insn[11:7]};
    imm_b = {{20{insn[31]}}, insn[7], insn[30:25], insn[11:8], 1'b0};
    imm_u = {insn[31:12], 12'b0};
    imm_j = {{12{insn[31]}}, insn[19:12], insn[20], insn[30:21], 1'b0};
    unique case (fmt)
      FMT_I:   imm = imm_i;
      FMT_S:   imm = imm_s;
      FMT_B:   imm = imm_b;
      FMT_U:   imm = imm_u;
      FMT_J:   imm = imm_j;
      default: imm = '0;
    endcase
  end
endmodule
