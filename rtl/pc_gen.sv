// PC Gen stage: the program counter register, its +4 incrementer and the PC mux.
//
// The register resets to RESET_VECTOR - 4 with its valid flag clear, so the
// first cycle out of reset steps it to RESET_VECTOR. After that it steps by 4
// each cycle the fetch stage accepts the current PC (advance), and loads the
// branch target whenever the mem-access stage reports a taken branch, which
// has priority over advancing. pc and pc_valid are registered outputs.
//
// Follows the original: the reset value (reset vector minus 4) and a taken
// branch winning over a stall. The pc_valid flag is this design's own.
module pc_gen #(
  parameter logic [31:0] RESET_VECTOR = icicle_pkg::RESET_VECTOR_DEFAULT
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        advance,        // fetch took pc this cycle
  input  logic        branch_taken,
  input  logic [31:0] branch_target,
  output logic [31:0] pc,
  output logic        pc_valid
);
  logic [31:0] pc_plus4;
  assign pc_plus4 = pc + 32'd4;

  always_ff @(posedge clk) begin
    if (rst) begin
      pc       <= RESET_VECTOR - 32'd4;
      pc_valid <= 1'b0;
    end else if (branch_taken) begin
      pc       <= branch_target;
      pc_valid <= 1'b1;
    end else if (advance || !pc_valid) begin
      pc       <= pc_plus4;
      pc_valid <= 1'b1;
    end
  end
endmodule
