// Decode stage: the 32 x 32-bit integer register file.
//
// One memory with two synchronous read ports and one write port. The read
// ports are not transparent: a read and a write of the same register on the
// same clock edge returns the old value, so the pipeline forwards the value
// written on that edge itself. x0 always reads as zero; writes to it are
// ignored. Read data appears the cycle after the address is presented.
//
// Follows the original: 32 x 32-bit registers with two read ports that are not
// transparent and one write port. Keeping x0 at zero is the RISC-V rule.
module register_file (
  input  logic        clk,
  input  logic [4:0]  rs1_addr,
  input  logic [4:0]  rs2_addr,
  output logic [31:0] rs1_rdata,
  output logic [31:0] rs2_rdata,
  input  logic        rd_en,
  input  logic [4:0]  rd_addr,
  input  logic [31:0] rd_wdata
);
  logic [31:0] regs [32];

  always_ff @(posedge clk) begin
    rs1_rdata <= (rs1_addr == 5'd0) ? 32'd0 : regs[rs1_addr];
    rs2_rdata <= (rs2_addr == 5'd0) ? 32'd0 : regs[rs2_addr];
    if (rd_en && rd_addr != 5'd0) regs[rd_addr] <= rd_wdata;
  end
endmodule
