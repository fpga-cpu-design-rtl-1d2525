// Testbench of the A and B operand multiplexers: every select with random
// data.
module operand_mux_tb;
  import icicle_pkg::*;
  a_sel_e a_sel;
  b_sel_e b_sel;
  logic [31:0] pc, rs1, rs2, imm, a, b;
  int checks = 0, failures = 0;
  operand_mux dut (.a_sel, .b_sel, .pc, .rs1_rdata(rs1), .rs2_rdata(rs2), .imm, .a, .b);
  task automatic chk(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", what, got, exp); end
  endtask
  initial begin
    for (int i = 0; i < 100; i++) begin
      pc = $urandom; rs1 = $urandom; rs2 = $urandom; imm = $urandom;
      a_sel = A_RS1;  b_sel = B_RS2;  #1 chk(a, rs1, "A=rs1"); chk(b, rs2, "B=rs2");
      a_sel = A_PC;   b_sel = B_IMM;  #1 chk(a, pc, "A=pc");   chk(b, imm, "B=imm");
      a_sel = A_ZERO; b_sel = B_FOUR; #1 chk(a, 0, "A=0");     chk(b, 4, "B=4");
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
