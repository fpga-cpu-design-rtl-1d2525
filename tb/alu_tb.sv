// Testbench of the ALU: random operands (plus corner values) through every
// function, compared with results computed here with plain operators. It
// starts with the small directed case of adding 1 and 2 and expecting 3 with
// no carry.
module alu_tb;
  import icicle_pkg::*;
  logic [31:0] a, b, csr, result;
  logic add_sub, sub_cmp, shift_right, shift_arith;
  logic_op_e logic_op;
  result_sel_e result_sel;
  flags_t flags;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .add_sub, .sub_cmp, .logic_op, .shift_right, .shift_arith,
           .result_sel, .csr_rdata(csr), .result, .flags);

  task automatic expect_eq(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: a=%h b=%h got %h expected %h", what, a, b, got, exp);
    end
  endtask

  initial begin
    logic [31:0] corner [6] = '{32'd0, 32'd1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'd31};
    a = 1; b = 2; add_sub = 0; result_sel = RES_ADDER; {sub_cmp, shift_right, shift_arith} = 0; csr = 0; logic_op = LOGIC_XOR;
    #1 expect_eq(result, 32'd3, "1 + 2");
    expect_eq(32'(flags.carry), 32'd0, "1 + 2 carry");
    #1;
    for (int i = 0; i < 2000; i++) begin
      a = (i % 4 == 0) ? corner[$urandom % 6] : $urandom;
      b = (i % 3 == 0) ? corner[$urandom % 6] : $urandom;
      csr = $urandom;
      {add_sub, sub_cmp, shift_right, shift_arith} = '0;
      logic_op = LOGIC_XOR;
      result_sel = RES_ADDER;                                    #1 expect_eq(result, a + b, "add");
      add_sub = 1;                                               #1 expect_eq(result, a - b, "sub");
      expect_eq({28'd0, flags.zero, flags.carry, flags.sign, flags.overflow},
                {28'd0, a == b, a < b, 1'((a - b) >> 31),
                 1'(($signed(a) < $signed(b)) != ((a - b) >> 31))}, "flags");
      result_sel = RES_SLT; sub_cmp = 1;                         #1 expect_eq(result, {31'd0, $signed(a) < $signed(b)}, "slt");
      sub_cmp = 0;                                               #1 expect_eq(result, {31'd0, a < b}, "sltu");
      result_sel = RES_LOGIC; logic_op = LOGIC_XOR;              #1 expect_eq(result, a ^ b, "xor");
      logic_op = LOGIC_OR;                                       #1 expect_eq(result, a | b, "or");
      logic_op = LOGIC_AND;                                      #1 expect_eq(result, a & b, "and");
      result_sel = RES_SHIFT;                                    #1 expect_eq(result, a << b[4:0], "sll");
      shift_right = 1;                                           #1 expect_eq(result, a >> b[4:0], "srl");
      shift_arith = 1;                                           #1 expect_eq(result, $unsigned($signed(a) >>> b[4:0]), "sra");
      result_sel = RES_CSR;                                      #1 expect_eq(result, csr, "csr");
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
