// Testbench of the Wishbone-to-peripheral bridge with two model peripherals
// whose read data encodes their slot and register address. Random reads and
// writes to slots 0..3: slots 0 and 1 must see exactly one select pulse with
// the right register address, write flag and data, and the bus must get ack
// one cycle later with that peripheral's data; the empty slots 2 and 3 must
// get err and no select.
module wb_bridge_tb;
  logic clk = 0, rst = 1;
  wb_if b();
  logic p_stb, p_we;
  logic [1:0] p_sel;
  logic [11:0] p_addr;
  logic [31:0] p_wdata;
  logic [31:0] p_rdata [2];
  int checks = 0, failures = 0;
  int sel_pulses = 0;
  always #5 clk = ~clk;

  wb_bridge #(.NPERIPH(2)) dut (.clk, .rst, .bus(b.slave), .p_stb, .p_sel, .p_addr, .p_we, .p_wdata, .p_rdata);
  assign p_rdata[0] = {20'hAAAA0, p_addr};
  assign p_rdata[1] = {20'hBBBB1, p_addr};

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (p_sel != 0) sel_pulses++;

  initial begin
    b.cyc = 0; b.stb = 0; b.we = 0; b.sel = 4'hF; b.adr = 0; b.dat_w = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 2000; i++) begin
      int slot, n_before;
      logic [9:0] reg_w;
      slot = $urandom % 4; reg_w = $urandom;
      b.adr = {16'h2000, 4'(slot), reg_w}; b.we = $urandom; b.dat_w = $urandom; b.cyc = 1; b.stb = 1;
      n_before = sel_pulses;
      #1;
      if (slot < 2) chk(p_sel == 2'(1 << slot) && p_stb && p_addr == {reg_w, 2'b00} && p_we == b.we && p_wdata == b.dat_w,
                        "peripheral request");
      else chk(p_sel == 0 && !p_stb, "no select for an empty slot");
      @(posedge clk); #1;
      if (slot < 2) chk(b.ack && !b.err && (b.we || b.dat_r == p_rdata[slot]) && sel_pulses == n_before + 1, "ack with data");
      else chk(b.err && !b.ack && sel_pulses == n_before, "err for an empty slot");
      chk(p_sel == 0, "select is a single pulse");
      @(posedge clk); #1;       // the transfer ends on this edge
      b.cyc = 0; b.stb = 0;
      if ($urandom % 2) begin
        #1 chk(!b.ack && !b.err, "one answer per request");
        @(posedge clk); #1;
      end
    end
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
