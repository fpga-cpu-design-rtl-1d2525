// Writeback stage: result multiplexer.
//
// Chooses what is written to rd: the ALU result or the data a load returned.
// Purely combinational.
//
// Follows the original's result mux exactly.
module wdata_mux
  import icicle_pkg::*;
(
  input  wdata_sel_e  sel,
  input  logic [31:0] result,
  input  logic [31:0] mem_rdata,
  output logic [31:0] rd_wdata
);
  assign rd_wdata = (sel == WD_MEM_RDATA) ? mem_rdata : result;
endmodule
