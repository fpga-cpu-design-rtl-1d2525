// Testbench of the AND gate: all four input combinations against the truth
// table.
module and_gate_tb;
  logic a, b, y;
  int checks = 0, failures = 0;
  and_gate dut (.a, .b, .y);
  initial begin
    logic [0:3] table_y = 4'b0001;
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== table_y[v]) begin failures++; $display("FAIL a=%b b=%b y=%b", a, b, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
