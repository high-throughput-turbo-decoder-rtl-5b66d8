// glut: generalized look-up table for the log-MAP correction term
// f(x) = ln(1 + exp(-|x|)), taking the signed difference x of two candidates
// directly, without forming |x| first.
//
// Two parts work side by side. Ls2 decides from the sign and the bits above
// bit 2 whether |x| is below 2.0 (8 units of 0.25); ELUT maps the sign and the
// three low bits to a 2-bit correction. The correction is forced to zero when
// Ls2 reports a big difference. ELUT follows the approximation table of the
// design (|x| 0 -> 0.75, 0.25..0.75 -> 0.5, 1.0..1.75 -> 0.25). For a negative
// x the low bits encode 8-|x|; x = -2.0 (low bits 000) gives 0, the same as
// any |x| >= 2.0 on the positive side.
//
// Interface: purely combinational. x is signed in units of 0.25, W bits wide
// (W >= 5); c is the correction in units of 0.25 (0..3).
//
// Design basis: the split into a range detector and a small table, and
// the table values, follow the reference design; the bit-level decoding for
// negative inputs is this design's choice.
module glut #(
  parameter int unsigned W = 12
) (
  input  logic signed [W-1:0] x,
  output logic        [1:0]   c
);
  logic       s;
  logic       big;    // |x| >= 2.0 (output of Ls2)
  logic [1:0] elut;

  assign s = x[W-1];

  // Ls2: positive x is big if any bit above bit 2 is set; negative x is
  // small only if all those bits are set (x in [-8, -1]).
  assign big = s ? ~(&x[W-2:3]) : (|x[W-2:3]);

  always_comb begin
    unique case ({s, x[2:0]})
      4'b0_000: elut = 2'd3;                       // |x| = 0
      4'b0_001, 4'b0_010, 4'b0_011: elut = 2'd2;   // |x| = 0.25 .. 0.75
      4'b0_100, 4'b0_101, 4'b0_110, 4'b0_111: elut = 2'd1;  // 1.0 .. 1.75
      4'b1_000: elut = 2'd0;                       // x = -2.0
      4'b1_001, 4'b1_010, 4'b1_011, 4'b1_100: elut = 2'd1;  // |x| = 1.75 .. 1.0
      default:  elut = 2'd2;                       // |x| = 0.75 .. 0.25
    endcase
  end

  // AND gates combining the ELUT outputs with the Ls2 decision.
  assign c = elut & {2{~big}};
endmodule
