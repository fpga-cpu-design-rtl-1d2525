// D-type flip-flop with set and reset, the sequential-logic example.
//
// On each rising clock edge Q takes D, unless R (reset, active high) or S
// (set, active high) is asserted, in which case Q becomes 0 or 1; R wins
// when both are high. Q_N is always the inverse of Q. The pins are those of
// the usual symbol; making set and reset synchronous and giving reset
// priority are choices of this model.
module d_flip_flop (
  input  logic clk,
  input  logic d,
  input  logic s,
  input  logic r,
  output logic q,
  output logic q_n
);
  always_ff @(posedge clk) begin
    if (r)      q <= 1'b0;
    else if (s) q <= 1'b1;
    else        q <= d;
  end
  assign q_n = ~q;
endmodule
