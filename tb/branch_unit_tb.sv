// Testbench of the branch unit: flags are produced here from random operand
// pairs the way the ALU forms them for rs1 - rs2, and the taken decision of
// each branch condition is compared with a direct comparison of the
// operands. Jumps are always taken and invalid instructions never.
module branch_unit_tb;
  import icicle_pkg::*;
  logic valid, branch, jump, taken;
  logic [2:0] funct3;
  flags_t flags;
  int checks = 0, failures = 0;
  branch_unit dut (.valid, .branch, .jump, .funct3, .flags, .taken);

  initial begin
    logic [31:0] a, b, d;
    logic exp;
    logic [2:0] f3s [6] = '{F3_BEQ, F3_BNE, F3_BLT, F3_BGE, F3_BLTU, F3_BGEU};
    for (int i = 0; i < 600; i++) begin
      a = $urandom; b = (i % 3 == 0) ? a : (i % 3 == 1) ? $urandom : a ^ 32'h8000_0000;
      d = a - b;
      flags.zero = (d == 0); flags.carry = a < b; flags.sign = d[31];
      flags.overflow = (a[31] != b[31]) && (d[31] != a[31]);
      foreach (f3s[k]) begin
        funct3 = f3s[k];
        case (funct3)
          F3_BEQ:  exp = a == b;
          F3_BNE:  exp = a != b;
          F3_BLT:  exp = $signed(a) < $signed(b);
          F3_BGE:  exp = $signed(a) >= $signed(b);
          F3_BLTU: exp = a < b;
          default: exp = a >= b;
        endcase
        valid = 1; branch = 1; jump = 0; #1 checks++; if (taken !== exp) failures++;
        valid = 0;                       #1 checks++; if (taken !== 0) failures++;
        valid = 1; branch = 0; jump = 1; #1 checks++; if (taken !== 1) failures++;
        jump = 0;                        #1 checks++; if (taken !== 0) failures++;
      end
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
