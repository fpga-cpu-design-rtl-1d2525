// Testbench of PC Gen: after reset the PC must be the reset vector minus 4
// and invalid, become the reset vector one cycle later, then step by 4 on
// each advance, hold otherwise, and jump to the branch target when a branch
// is taken (which wins over advance).
module pc_gen_tb;
  localparam logic [31:0] RV = 32'h0010_0000;
  logic clk = 0, rst = 1, advance = 0, taken = 0;
  logic [31:0] target, pc;
  logic pc_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pc_gen #(.RESET_VECTOR(RV)) dut (.clk, .rst, .advance, .branch_taken(taken), .branch_target(target), .pc, .pc_valid);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s pc=%h", what, pc); end
  endtask

  initial begin
    logic [31:0] exp;
    repeat (2) @(negedge clk);
    chk(pc == RV - 4 && !pc_valid, "reset value");
    rst = 0;
    @(negedge clk) chk(pc == RV && pc_valid, "first PC is the reset vector");
    exp = RV;
    for (int i = 0; i < 500; i++) begin
      advance = $urandom; taken = ($urandom % 8 == 0); target = $urandom & ~32'd3;
      @(negedge clk);
      exp = taken ? target : advance ? exp + 4 : exp;
      chk(pc == exp && pc_valid, $sformatf("step %0d expected %h", i, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
