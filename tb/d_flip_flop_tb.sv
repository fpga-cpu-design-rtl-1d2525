// Testbench of the D flip-flop: random D, S and R each cycle against a
// reference register updated here; also checks that Q holds between edges and
// that Q_N is its inverse.
module d_flip_flop_tb;
  logic clk = 0, d = 0, s = 0, r = 1, q, q_n;
  logic ref_q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  d_flip_flop dut (.clk, .d, .s, .r, .q, .q_n);
  initial begin
    @(negedge clk);
    ref_q = 0;
    for (int i = 0; i < 300; i++) begin
      d = $urandom; s = ($urandom % 5 == 0); r = ($urandom % 5 == 0);
      #2 checks++;
      if (q !== ref_q) begin failures++; $display("FAIL q changed between edges"); end
      @(posedge clk);
      ref_q = r ? 1'b0 : s ? 1'b1 : d;
      @(negedge clk);
      checks++;
      if (q !== ref_q || q_n !== !ref_q) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d d=%b s=%b r=%b q=%b q_n=%b", i, d, s, r, q, q_n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
