// Execute stage: the arithmetic and logic unit.
//
// An adder computes a + b or a - b into 33 bits; the top bit is the carry
// (for a subtraction, the borrow: set when a < b unsigned). From the
// subtraction come the flags the branch unit uses: zero, carry, sign and
// signed overflow. Beside the adder are the logic unit (XOR, OR, AND), a
// barrel shifter (left, right logical, right arithmetic, by b[4:0]) and the
// set-less-than result (signed: sign XOR overflow; unsigned: carry).
// result_sel picks the result; RES_CSR passes csr_rdata through. Purely
// combinational.
//
// Follows the original: one adder that subtracts when add_sub is set, with the
// borrow as carry, and a flags output. Own choices: the exact flag set and the
// logic, shift, set-less-than and counter-read paths sharing the result mux.
module alu
  import icicle_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        add_sub,
  input  logic        sub_cmp,
  input  logic_op_e   logic_op,
  input  logic        shift_right,
  input  logic        shift_arith,
  input  result_sel_e result_sel,
  input  logic [31:0] csr_rdata,
  output logic [31:0] result,
  output flags_t      flags
);
  logic [32:0] sum;
  logic [31:0] logic_res, shift_res;
  logic        lt;

  always_comb begin
    sum = add_sub ? ({1'b0, a} - {1'b0, b}) : ({1'b0, a} + {1'b0, b});
    flags.zero     = (sum[31:0] == 32'd0);
    flags.carry    = sum[32];
    flags.sign     = sum[31];
    flags.overflow = (a[31] ^ b[31]) & (a[31] ^ sum[31]);
    lt = sub_cmp ? (flags.sign ^ flags.overflow) : flags.carry;

    unique case (logic_op)
      LOGIC_OR:  logic_res = a | b;
      LOGIC_AND: logic_res = a & b;
      default:   logic_res = a ^ b;
    endcase

    if (!shift_right)     shift_res = a << b[4:0];
    else if (shift_arith) shift_res = $unsigned($signed(a) >>> b[4:0]);
    else                  shift_res = a >> b[4:0];

    unique case (result_sel)
      RES_LOGIC: result = logic_res;
      RES_SHIFT: result = shift_res;
      RES_SLT:   result = {31'd0, lt};
      RES_CSR:   result = csr_rdata;
      default:   result = sum[31:0];
    endcase
  end
endmodule
