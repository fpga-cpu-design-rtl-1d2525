// Instruction encoders for writing RV32I test programs inside testbenches.
// Each function returns one 32-bit instruction word in the standard RISC-V
// encoding; immediates are given as byte offsets or plain values.
package rv_asm_pkg;
  function automatic logic [31:0] enc_r(input logic [6:0] f7, input logic [4:0] rs2, rs1,
                                        input logic [2:0] f3, input logic [4:0] rd, input logic [6:0] op);
    return {f7, rs2, rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] enc_i(input int imm, input logic [4:0] rs1, input logic [2:0] f3,
                                        input logic [4:0] rd, input logic [6:0] op);
    logic [31:0] v = imm;
    return {v[11:0], rs1, f3, rd, op};
  endfunction
  function automatic logic [31:0] enc_s(input int imm, input logic [4:0] rs2, rs1, input logic [2:0] f3);
    logic [31:0] v = imm;
    return {v[11:5], rs2, rs1, f3, v[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] enc_b(input int imm, input logic [4:0] rs2, rs1, input logic [2:0] f3);
    logic [31:0] v = imm;
    return {v[12], v[10:5], rs2, rs1, f3, v[4:1], v[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] enc_u(input logic [31:0] imm, input logic [4:0] rd, input logic [6:0] op);
    return {imm[31:12], rd, op};
  endfunction
  function automatic logic [31:0] enc_j(input int imm, input logic [4:0] rd);
    logic [31:0] v = imm;
    return {v[20], v[10:1], v[11], v[19:12], rd, 7'b1101111};
  endfunction

  function automatic logic [31:0] ADD (input logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'd0, rd, 7'h33); endfunction
  function automatic logic [31:0] SUB (input logic [4:0] rd, rs1, rs2); return enc_r(7'h20, rs2, rs1, 3'd0, rd, 7'h33); endfunction
  function automatic logic [31:0] SLL (input logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'd1, rd, 7'h33); endfunction
  function automatic logic [31:0] SLT (input logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'd2, rd, 7'h33); endfunction
  function automatic logic [31:0] SLTU(input logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'd3, rd, 7'h33); endfunction
  function automatic logic [31:0] XOR (input logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'd4, rd, 7'h33); endfunction
  function automatic logic [31:0] SRL (input logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'd5, rd, 7'h33); endfunction
  function automatic logic [31:0] SRA (input logic [4:0] rd, rs1, rs2); return enc_r(7'h20, rs2, rs1, 3'd5, rd, 7'h33); endfunction
  function automatic logic [31:0] OR  (input logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'd6, rd, 7'h33); endfunction
  function automatic logic [31:0] AND (input logic [4:0] rd, rs1, rs2); return enc_r(7'h00, rs2, rs1, 3'd7, rd, 7'h33); endfunction

  function automatic logic [31:0] ADDI (input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'd0, rd, 7'h13); endfunction
  function automatic logic [31:0] SLTI (input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'd2, rd, 7'h13); endfunction
  function automatic logic [31:0] SLTIU(input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'd3, rd, 7'h13); endfunction
  function automatic logic [31:0] XORI (input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'd4, rd, 7'h13); endfunction
  function automatic logic [31:0] ORI  (input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'd6, rd, 7'h13); endfunction
  function automatic logic [31:0] ANDI (input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'd7, rd, 7'h13); endfunction
  function automatic logic [31:0] SLLI (input logic [4:0] rd, rs1, input int sh);  return enc_i(sh & 31, rs1, 3'd1, rd, 7'h13); endfunction
  function automatic logic [31:0] SRLI (input logic [4:0] rd, rs1, input int sh);  return enc_i(sh & 31, rs1, 3'd5, rd, 7'h13); endfunction
  function automatic logic [31:0] SRAI (input logic [4:0] rd, rs1, input int sh);  return enc_i((sh & 31) | 32'h400, rs1, 3'd5, rd, 7'h13); endfunction

  function automatic logic [31:0] LB (input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'd0, rd, 7'h03); endfunction
  function automatic logic [31:0] LH (input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'd1, rd, 7'h03); endfunction
  function automatic logic [31:0] LW (input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'd2, rd, 7'h03); endfunction
  function automatic logic [31:0] LBU(input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'd4, rd, 7'h03); endfunction
  function automatic logic [31:0] LHU(input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'd5, rd, 7'h03); endfunction
  function automatic logic [31:0] SB (input logic [4:0] rs2, rs1, input int imm); return enc_s(imm, rs2, rs1, 3'd0); endfunction
  function automatic logic [31:0] SH (input logic [4:0] rs2, rs1, input int imm); return enc_s(imm, rs2, rs1, 3'd1); endfunction
  function automatic logic [31:0] SW (input logic [4:0] rs2, rs1, input int imm); return enc_s(imm, rs2, rs1, 3'd2); endfunction

  function automatic logic [31:0] BEQ (input logic [4:0] rs1, rs2, input int off); return enc_b(off, rs2, rs1, 3'd0); endfunction
  function automatic logic [31:0] BNE (input logic [4:0] rs1, rs2, input int off); return enc_b(off, rs2, rs1, 3'd1); endfunction
  function automatic logic [31:0] BLT (input logic [4:0] rs1, rs2, input int off); return enc_b(off, rs2, rs1, 3'd4); endfunction
  function automatic logic [31:0] BGE (input logic [4:0] rs1, rs2, input int off); return enc_b(off, rs2, rs1, 3'd5); endfunction
  function automatic logic [31:0] BLTU(input logic [4:0] rs1, rs2, input int off); return enc_b(off, rs2, rs1, 3'd6); endfunction
  function automatic logic [31:0] BGEU(input logic [4:0] rs1, rs2, input int off); return enc_b(off, rs2, rs1, 3'd7); endfunction

  function automatic logic [31:0] LUI  (input logic [4:0] rd, input logic [31:0] imm); return enc_u(imm, rd, 7'h37); endfunction
  function automatic logic [31:0] AUIPC(input logic [4:0] rd, input logic [31:0] imm); return enc_u(imm, rd, 7'h17); endfunction
  function automatic logic [31:0] JAL  (input logic [4:0] rd, input int off); return enc_j(off, rd); endfunction
  function automatic logic [31:0] JALR (input logic [4:0] rd, rs1, input int imm); return enc_i(imm, rs1, 3'd0, rd, 7'h67); endfunction
  function automatic logic [31:0] CSRR (input logic [4:0] rd, input int csr); return enc_i(csr, 5'd0, 3'd2, rd, 7'h73); endfunction
  function automatic logic [31:0] FENCE(); return 32'h0ff0000f; endfunction
  function automatic logic [31:0] NOP(); return ADDI(5'd0, 5'd0, 0); endfunction

  // Upper and lower parts for loading a 32-bit constant with LUI + ADDI.
  function automatic logic [31:0] hi20(input logic [31:0] v); return v + 32'h800; endfunction
  function automatic int lo12(input logic [31:0] v); return int'($signed(v[11:0])); endfunction
endpackage
