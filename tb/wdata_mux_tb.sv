// Testbench of the write-back result multiplexer: random inputs, both selects.
module wdata_mux_tb;
  import icicle_pkg::*;
  wdata_sel_e sel;
  logic [31:0] result, mem_rdata, rd_wdata;
  int checks = 0, failures = 0;
  wdata_mux dut (.sel, .result, .mem_rdata, .rd_wdata);
  initial begin
    for (int i = 0; i < 200; i++) begin
      result = $urandom; mem_rdata = $urandom;
      sel = WD_ALU_RESULT; #1 checks++; if (rd_wdata !== result) failures++;
      sel = WD_MEM_RDATA;  #1 checks++; if (rd_wdata !== mem_rdata) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
