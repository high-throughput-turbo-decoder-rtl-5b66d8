// max_star: two-input Jacobian logarithm max*(a, b) = max(a, b) + f(|a - b|),
// with the correction f taken from the GLUT. Used by the LLR unit.
// Combinational; operands signed, W bits, units of 0.25.
//
// Design basis: max* with a table correction is the reference design's
// log-MAP operator; this helper only packages it.
module max_star #(
  parameter int unsigned W = 14
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] y
);
  logic signed [W-1:0] d;
  logic [1:0] c;
  assign d = a - b;
  glut #(.W(W)) u_glut (.x(d), .c(c));
  assign y = (d[W-1] ? b : a) + W'(c);
endmodule
