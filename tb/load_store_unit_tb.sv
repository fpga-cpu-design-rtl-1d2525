// Testbench of the load/store unit against a byte-addressed memory model that
// answers after a random 0 to 2 cycles. Random loads and stores of every size
// at aligned addresses: stores must change exactly the addressed bytes, loads
// must return the addressed bytes zero- or sign-extended, busy must be high
// exactly until the answer, and nothing may go on the bus without a valid
// load or store.
module load_store_unit_tb;
  import icicle_pkg::*;
  logic clk = 0, rst = 1;
  logic valid = 0, load = 0, store = 0, busy;
  logic [2:0] funct3;
  logic [31:0] addr, wdata, rdata;
  logic [29:0] adr;
  logic [31:0] dat_w, dat_r;
  logic [3:0] sel;
  logic cyc, stb, we, ack, err;
  logic [31:0] mem [64];
  int wait_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  load_store_unit dut (.clk, .rst, .valid, .load, .store, .funct3, .addr, .wdata, .rdata, .busy,
                       .dbus_adr(adr), .dbus_dat_w(dat_w), .dbus_sel(sel), .dbus_cyc(cyc),
                       .dbus_stb(stb), .dbus_we(we), .dbus_dat_r(dat_r), .dbus_ack(ack), .dbus_err(err));

  assign err   = 1'b0;
  assign ack   = cyc && stb && wait_n == 0;
  assign dat_r = mem[adr % 64];
  always @(posedge clk) begin
    if (ack) begin
      wait_n <= $urandom_range(0, 2);
      if (we) for (int i = 0; i < 4; i++) if (sel[i]) mem[adr % 64][8*i +: 8] <= dat_w[8*i +: 8];
    end else if (cyc && wait_n > 0) wait_n <= wait_n - 1;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  logic [31:0] model [64];
  initial begin
    logic [2:0] f3s [5] = '{F3_B, F3_H, F3_W, F3_BU, F3_HU};
    foreach (mem[i]) begin mem[i] = $urandom; model[i] = mem[i]; end
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 1000; i++) begin
      logic [31:0] w, exp;
      int idx, sh;
      bit is_store = $urandom % 2;
      funct3 = is_store ? 3'($urandom % 3) : f3s[$urandom % 5];
      addr = $urandom & 32'h0000_00FF;
      if (funct3[1:0] == 2'b01) addr[0] = 0;
      if (funct3[1:0] == 2'b10) addr[1:0] = 0;
      wdata = $urandom;
      idx = addr[7:2]; sh = 8 * addr[1:0];
      valid = ($urandom % 6 != 0); load = !is_store; store = is_store;
      #1;
      if (!valid) begin
        chk(!cyc && !stb && !busy, "idle bus without a valid access");
        @(negedge clk);
        continue;
      end
      chk(cyc && stb && we == is_store && adr == addr[31:2], "request");
      // wait for the answer; the transfer ends on the edge after ack is seen
      while (!ack) begin
        chk(busy, "busy while unanswered");
        @(negedge clk);
        chk(cyc && stb && adr == addr[31:2], "request held while busy");
      end
      chk(!busy, "busy drops with ack");
      if (is_store) begin
        case (funct3[1:0])
          2'b00: model[idx][sh +: 8]  = wdata[7:0];
          2'b01: model[idx][sh +: 16] = wdata[15:0];
          default: model[idx] = wdata;
        endcase
      end else begin
        w = model[idx] >> sh;
        case (funct3)
          F3_B:  exp = {{24{w[7]}}, w[7:0]};
          F3_H:  exp = {{16{w[15]}}, w[15:0]};
          F3_BU: exp = {24'd0, w[7:0]};
          F3_HU: exp = {16'd0, w[15:0]};
          default: exp = w;
        endcase
        chk(rdata == exp, $sformatf("load f3=%0d addr=%h got %h expected %h", funct3, addr, rdata, exp));
      end
      @(negedge clk);
      valid = 0;
    end
    @(negedge clk);
    foreach (mem[i]) chk(mem[i] == model[i], $sformatf("memory word %0d", i));
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
