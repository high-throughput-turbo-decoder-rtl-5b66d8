// hybrid_sub: hybrid 4-input addition/subtraction d = a0 + b0 - a1 - b1.
//
// The two candidates of a radix-4 ACS node leave the one-stage carry-save
// adders as (sum, carry) pairs (a0, b0) and (a1, b1). Rather than finishing
// both additions and subtracting, two rows of plus-plus-minus full adders
// fold the four vectors into one carry-save pair: row 1 adds a0 + b0 + ~a1,
// row 2 adds that result, ~b1 and row 1's carries. The two "+1" terms of the
// two negations enter as the carry-in of row 2 and as bit 0 of row 2's
// carry vector. One carry-propagate adder then yields the difference, whose
// sign picks the larger candidate and whose value addresses the GLUT.
//
// Interface: combinational, all operands W bits, arithmetic modulo 2^W.
//
// Design basis: the two full-adder rows follow the reference design; the
// placement of the two +1 terms and the final carry-propagate adder are this
// design's choices.
module hybrid_sub #(
  parameter int unsigned W = 12
) (
  input  logic signed [W-1:0] a0,
  input  logic signed [W-1:0] b0,
  input  logic signed [W-1:0] a1,
  input  logic signed [W-1:0] b1,
  output logic signed [W-1:0] d
);
  logic [W-1:0] s1, c1, s2, c2;   // c1, c2: carries into each bit position
  logic [W-1:0] n1, m1;

  assign n1 = ~a1;
  assign m1 = ~b1;

  always_comb begin
    // Row 1: full adders on (b0, a0, ~a1), carry moves one bit left.
    c1[0] = 1'b1;                         // +1 of the first negation
    for (int i = 0; i < W; i++) begin
      s1[i] = b0[i] ^ a0[i] ^ n1[i];
      if (i < W-1) c1[i+1] = (b0[i] & a0[i]) | (b0[i] & n1[i]) | (a0[i] & n1[i]);
    end
    // Row 2: full adders on (s1, ~b1, c1).
    c2[0] = 1'b1;                         // +1 of the second negation
    for (int i = 0; i < W; i++) begin
      s2[i] = s1[i] ^ m1[i] ^ c1[i];
      if (i < W-1) c2[i+1] = (s1[i] & m1[i]) | (s1[i] & c1[i]) | (m1[i] & c1[i]);
    end
  end

  assign d = signed'(s2 + c2);
endmodule
