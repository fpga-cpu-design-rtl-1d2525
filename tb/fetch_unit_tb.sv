// Testbench of the fetch stage together with PC Gen. A memory model answers
// instruction reads after a random 0 to 2 cycles with a word that encodes its
// own address; decode stalls at random and flushes with a jump to a random
// target happen now and then. The sequence of instructions that leaves the
// stage must be exactly the addresses PC Gen walks through: consecutive words,
// restarting at each flush target, none lost, none repeated, none from
// before the flush. Also checks that one instruction per cycle is reached
// with a zero-wait memory and no stalls.
module fetch_unit_tb;
  logic clk = 0, rst = 1;
  logic [31:0] pf_pc, f_pc, f_insn, next_insn, target;
  logic pf_valid, pf_advance, flush = 0, d_stall = 0;
  logic [29:0] adr;
  logic cyc, stb, ack, err;
  logic [31:0] dat;
  logic f_valid;
  int wait_n = 0;
  bit zero_wait = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pc_gen #(.RESET_VECTOR(32'h1000)) u_pc (.clk, .rst, .advance(pf_advance), .branch_taken(flush),
                                          .branch_target(target), .pc(pf_pc), .pc_valid(pf_valid));
  fetch_unit dut (.clk, .rst, .pf_pc, .pf_valid, .pf_advance, .flush, .d_stall,
                  .ibus_adr(adr), .ibus_cyc(cyc), .ibus_stb(stb), .ibus_dat_r(dat), .ibus_ack(ack),
                  .ibus_err(err), .f_valid, .f_pc, .f_insn, .next_insn);

  assign err = 1'b0;
  assign ack = cyc && stb && wait_n == 0;
  assign dat = {adr, 2'b11} ^ 32'h5A5A_0000;
  always @(posedge clk) begin
    if (ack) wait_n <= zero_wait ? 0 : $urandom_range(0, 2);
    else if (cyc && wait_n > 0) wait_n <= wait_n - 1;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  logic [31:0] expect_pc = 32'h1000;
  logic [31:0] prev_next;
  int n_out = 0;
  always @(posedge clk) if (!rst) begin
    if (f_valid) chk(f_insn == prev_next, "next_insn announced the instruction now in decode");
    if (f_valid && !d_stall && !flush) begin
      chk(f_pc == expect_pc, $sformatf("pc %h expected %h", f_pc, expect_pc));
      chk(f_insn == (f_pc ^ 32'h5A5A_0003), "instruction word matches its address");
      expect_pc = f_pc + 4;
      n_out++;
    end
    if (flush) expect_pc = target;
    prev_next = next_insn;
  end

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      d_stall = ($urandom % 3 == 0);
      flush   = ($urandom % 25 == 0);
      target  = $urandom & 32'h000F_FFFC;
    end
    @(negedge clk) {d_stall, flush} = 0;
    zero_wait = 1;
    repeat (5) @(negedge clk);
    t0 = n_out;
    repeat (100) @(negedge clk);
    chk(n_out - t0 == 100, $sformatf("throughput %0d per 100 cycles", n_out - t0));
    chk(n_out > 1000, "enough instructions delivered");
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
