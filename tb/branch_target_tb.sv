// Testbench of the branch target adder: PC-relative targets for branches and
// JAL, rs1-relative targets with bit 0 cleared for JALR.
module branch_target_tb;
  logic jalr;
  logic [31:0] pc, rs1, imm, target;
  int checks = 0, failures = 0;
  branch_target dut (.jalr, .pc, .rs1_rdata(rs1), .imm, .target);
  initial begin
    for (int i = 0; i < 500; i++) begin
      pc = $urandom & ~32'd3; rs1 = $urandom; imm = $signed(13'($urandom));
      jalr = 0; #1 checks++; if (target !== pc + imm) failures++;
      jalr = 1; #1 checks++; if (target !== ((rs1 + imm) & ~32'd1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
