// Testbench of the immediate decoder: random instructions are given a random
// immediate through the rv_asm_pkg encoders, and the decoder must recover it
// for each format (I, S, B, U, J; R gives zero).
module imm_decoder_tb;
  import icicle_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] insn, imm;
  fmt_e fmt;
  int checks = 0, failures = 0;
  imm_decoder dut (.insn, .fmt, .imm);
  task automatic chk(input logic [31:0] exp, input string what);
    #1 checks++;
    if (imm !== exp) begin failures++; if (failures < 10) $display("FAIL %s insn=%h got %h expected %h", what, insn, imm, exp); end
  endtask
  initial begin
    int v;
    for (int i = 0; i < 500; i++) begin
      v = int'($urandom_range(0, 4095)) - 2048;
      insn = enc_i(v, 5'($urandom), 3'($urandom), 5'($urandom), 7'h13); fmt = FMT_I; chk(v, "I");
      insn = enc_s(v, 5'($urandom), 5'($urandom), 3'($urandom));        fmt = FMT_S; chk(v, "S");
      v = 2 * (int'($urandom_range(0, 4095)) - 2048);
      insn = enc_b(v, 5'($urandom), 5'($urandom), 3'($urandom));        fmt = FMT_B; chk(v, "B");
      v = $urandom & 32'hFFFF_F000;
      insn = enc_u(v, 5'($urandom), 7'h37);                             fmt = FMT_U; chk(v, "U");
      v = 2 * (int'($urandom_range(0, 32'hFFFFF)) - 32'h80000);
      insn = enc_j(v, 5'($urandom));                                    fmt = FMT_J; chk(v, "J");
      insn = $urandom;                                                  fmt = FMT_R; chk(0, "R");
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
