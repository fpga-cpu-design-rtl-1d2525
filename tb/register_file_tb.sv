// Testbench of the register file: random writes and reads on both ports
// against a model array. Read data must appear one cycle after the address,
// x0 must read zero, and a read of a register written on the same edge must
// return the old value (the ports are not transparent).
module register_file_tb;
  logic clk = 0;
  logic [4:0] ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic we;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  register_file dut (.clk, .rs1_addr(ra1), .rs2_addr(ra2), .rs1_rdata(rd1), .rs2_rdata(rd2),
                     .rd_en(we), .rd_addr(wa), .rd_wdata(wd));
  initial begin
    logic [31:0] e1, e2;
    we = 1;
    for (int r = 0; r < 32; r++) begin
      @(negedge clk) wa = 5'(r); wd = $urandom; ra1 = 0; ra2 = 0;
      model[r] = (r == 0) ? 0 : wd;
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ra1 = $urandom; ra2 = (i % 4 == 0) ? ra1 : 5'($urandom);
      we = $urandom; wa = (i % 5 == 0) ? ra1 : 5'($urandom); wd = $urandom;
      e1 = model[ra1]; e2 = model[ra2];          // old values, even if written now
      @(posedge clk);
      if (we && wa != 0) model[wa] = wd;
      @(negedge clk) we = 0;
      checks += 2;
      if (rd1 !== e1) begin failures++; if (failures < 10) $display("FAIL port1 x%0d %h vs %h", ra1, rd1, e1); end
      if (rd2 !== e2) begin failures++; if (failures < 10) $display("FAIL port2 x%0d %h vs %h", ra2, rd2, e2); end
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
