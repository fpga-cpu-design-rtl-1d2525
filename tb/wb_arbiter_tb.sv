// Testbench of the Wishbone arbiter. Two random masters (an instruction port
// that only reads, a data port that reads and writes) share one slave model
// that answers after a random 0 to 3 cycles. Checks: each master only ever
// sees the answer to its own request with the right data; the slave always
// sees the granted master's request; the grant does not change while a cycle
// is unanswered; when both ports ask on a free bus the instruction port wins;
// and both ports finish many transfers, so neither starves.
module wb_arbiter_tb;
  logic clk = 0, rst = 1;
  wb_if ib(), db(), bb();
  int wait_n = 0;
  int checks = 0, failures = 0;
  int n_i = 0, n_d = 0, n_both = 0;
  logic [31:0] smem [16];
  always #5 clk = ~clk;

  wb_arbiter dut (.clk, .rst, .ibus(ib.slave), .dbus(db.slave), .bus(bb.master));

  function automatic logic [31:0] pattern(input logic [29:0] a);
    return {a, 2'b01} ^ 32'hA5A5_0000;
  endfunction

  // slave model: reads return pattern() for high addresses, memory for low ones
  assign bb.ack   = bb.cyc && bb.stb && wait_n == 0;
  assign bb.err   = 1'b0;
  assign bb.dat_r = (bb.adr < 16) ? smem[bb.adr] : pattern(bb.adr);
  always @(posedge clk) begin
    if (bb.ack) begin
      wait_n <= $urandom_range(0, 3);
      if (bb.we && bb.adr < 16) smem[bb.adr] <= bb.dat_w;
    end else if (bb.cyc && wait_n > 0) wait_n <= wait_n - 1;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  // instruction master
  initial begin
    ib.cyc = 0; ib.stb = 0; ib.we = 0; ib.sel = 4'hF; ib.dat_w = 0; ib.adr = 0;
    @(posedge clk iff !rst); #1;
    forever begin
      if ($urandom % 4 != 0) begin
        ib.adr = 30'h100 + 30'($urandom % 256); ib.cyc = 1; ib.stb = 1;
        #1 while (!ib.ack) begin @(posedge clk); #1; end
        chk(ib.dat_r == pattern(ib.adr), "instruction read data");
        n_i++;
      end
      @(posedge clk); #1;
      ib.cyc = 0; ib.stb = 0;
    end
  end

  // data master: alternating write then read-back of one of 16 words
  logic [31:0] dmodel [16];
  initial begin
    logic [29:0] a;
    db.cyc = 0; db.stb = 0; db.we = 0; db.sel = 4'hF; db.dat_w = 0; db.adr = 0;
    @(posedge clk iff !rst); #1;
    forever begin
      if ($urandom % 3 != 0) begin
        a = 30'($urandom % 16);
        db.adr = a; db.we = $urandom; db.dat_w = $urandom; db.cyc = 1; db.stb = 1;
        #1 while (!db.ack) begin @(posedge clk); #1; end
        if (db.we) dmodel[a] = db.dat_w;
        else chk(db.dat_r == dmodel[a], "data read returns the last write");
        n_d++;
      end
      @(posedge clk); #1;
      db.cyc = 0; db.stb = 0;
    end
  end

  // bus monitor
  logic busy = 0, owner_d = 0;
  always @(negedge clk) if (!rst) begin
    chk(!(ib.ack && db.ack), "one ack at a time");
    chk(!ib.ack || ib.cyc, "no ack to an idle instruction port");
    chk(!db.ack || db.cyc, "no ack to an idle data port");
    if (bb.cyc) begin
      logic granted;
      granted = busy ? owner_d : !ib.cyc;
      chk(granted ? (bb.adr == db.adr && bb.we == db.we && bb.dat_w == db.dat_w)
                  : (bb.adr == ib.adr && !bb.we), "slave sees the granted request");
      chk(!(granted ? ib.ack : db.ack), "no answer to the waiting port");
      if (!busy && ib.cyc && db.cyc) begin
        n_both++;
        chk(!granted, "instruction port wins on a free bus");
      end
      owner_d = granted;
    end
  end
  always @(posedge clk) busy <= !rst && bb.cyc && !bb.ack;

  initial begin
    foreach (smem[i]) begin smem[i] = 0; dmodel[i] = 0; end
    repeat (2) @(negedge clk);
    rst = 0;
    repeat (4000) @(negedge clk);
    chk(n_i > 500 && n_d > 150, $sformatf("both ports progress (%0d, %0d)", n_i, n_d));
    chk(n_both > 50, "contention happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
