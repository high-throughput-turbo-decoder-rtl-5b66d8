// bmu_r4: radix-4 branch metric unit for the rate-1/3 component code.
//
// For each of the two trellis stages of a radix-4 step (k-1 and k) it scales
// the systematic and parity soft inputs by the channel reliability Lc = 1.5
// (3*y/2), adds the a-priori value to the systematic term, X = Lc*ys + La,
// and forms the two radix-2 branch metrics (X + P)/2 and (X - P)/2 with
// P = Lc*yp. Eight adders combine them into the radix-4 metrics whose
// earlier-stage label is 1 or 3; the other eight are their negations,
// delta{a^1,b^1} = -delta{a,b}. Output dl[{a,b}] is the metric of the path
// with radix-2 label a at stage k-1 and b at stage k (labels in turbo_pkg).
// The halving is an arithmetic right shift by one.
//
// Interface and timing: s0 is stage k-1, s1 is stage k. The scaled soft
// inputs and the a-priori values are registered, so dl, x0 and x1 belong to
// the symbols presented one clock earlier. x0 and x1 are the per-stage X
// terms, reused to extract the extrinsic output.
//
// Design basis: Lc = 1.5, the halving of gamma = (La*u + Lc*ys*u + Lc*yp*p)/2,
// the registers after the Lc multipliers and on the a-priori inputs, and the
// eight-adder/eight-negation structure follow the reference design; the label
// numbering and widths are this design's choices.
module bmu_r4
  import turbo_pkg::*;
(
  input  logic   clk,
  input  sym_t   s0,
  input  sym_t   s1,
  output delta_t dl [16],
  output logic signed [XW-1:0] x0,
  output logic signed [XW-1:0] x1
);
  typedef logic signed [XW-1:0] xw_t;

  function automatic xw_t lc_mul(input soft_t y);
    xw_t t;
    t = xw_t'(y) * xw_t'(3);
    return t >>> 1;
  endfunction

  xw_t ys0_q, ys1_q, p0, p1;   // Lc * y, registered
  ext_t la0_q, la1_q;          // a-priori, registered
  xw_t g [2][4];               // radix-2 metric per stage and label

  always_ff @(posedge clk) begin
    ys0_q <= lc_mul(s0.ys);
    ys1_q <= lc_mul(s1.ys);
    p0    <= lc_mul(s0.yp);
    p1    <= lc_mul(s1.yp);
    la0_q <= s0.la;
    la1_q <= s1.la;
  end

  assign x0 = ys0_q + xw_t'(la0_q);
  assign x1 = ys1_q + xw_t'(la1_q);

  always_comb begin
    xw_t pp0, pm0, pp1, pm1;
    pp0 = (x0 + p0) >>> 1;
    pm0 = (x0 - p0) >>> 1;
    pp1 = (x1 + p1) >>> 1;
    pm1 = (x1 - p1) >>> 1;
    g[0][1] = pp0; g[0][0] = -pp0; g[0][3] = pm0; g[0][2] = -pm0;
    g[1][1] = pp1; g[1][0] = -pp1; g[1][3] = pm1; g[1][2] = -pm1;
    for (int a = 1; a < 4; a += 2)
      for (int b = 0; b < 4; b++) begin
        dl[a*4 + b]         = delta_t'(g[0][a] + g[1][b]);
        dl[(a^1)*4 + (b^1)] = -delta_t'(g[0][a] + g[1][b]);
      end
  end
endmodule
