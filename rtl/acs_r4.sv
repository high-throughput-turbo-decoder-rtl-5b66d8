// acs_r4: one node of the improved radix-4 offset-add-compare-select (OACS)
// recursion, with the normalization detector.
//
// Each of the four incoming paths carries a state metric in OACS form (value
// a, pending offset b) and a radix-4 branch metric delta. A one-stage
// carry-save adder reduces a + b + delta to a (sum, carry) pair, and a
// carry-propagate adder turns each pair into a candidate. In parallel, two
// hybrid subtractors form cand0 - cand1 and cand2 - cand3 straight from the
// carry-save pairs; their signs pick each pair's winner and their values
// address two GLUTs. Four comparators (0-2, 0-3, 1-2, 1-3) decide between the
// two pair winners, so max*(w,x,y,z) is approximated by the larger of
// max*(w,x) and max*(y,z): the selected maximum becomes the new value a, and
// the correction of the winning pair becomes the new offset b, added only in
// the next recursion step.
// Normalization: "over" reports a candidate above 960; the caller ORs this
// over all 16 nodes and feeds the result back as "norm", which subtracts 256
// from the selected value. The value is held in 0..1023.
//
// Interface: combinational; the caller holds the registers.
//
// Design basis: the OACS form, the one-stage CSA, the hybrid subtraction,
// the two GLUTs with four comparators, and the 960/256 normalization follow the
// reference architecture. Which candidate pairs the comparators use, the
// unsigned metric range with clamping and the 12-bit candidate width are this
// design's choices.
module acs_r4
  import turbo_pkg::*;
(
  input  sm_t            sm_in [4],
  input  delta_t         dl    [4],
  input  logic           norm,
  output sm_t            sm_out,
  output logic           over
);
  typedef logic signed [CW-1:0] cw_t;

  cw_t sv [4];   // carry-save sum vectors
  cw_t cv [4];   // carry-save carry vectors
  cw_t cand [4];
  cw_t d01, d23;
  logic [1:0] g01, g23;
  logic sel01, sel23;            // 1: second candidate of the pair is larger
  logic c02, c03, c12, c13;      // cand_i >= cand_j
  logic hi;                      // 1: pair (2,3) wins
  cw_t  vmax, vnorm;

  always_comb begin
    for (int n = 0; n < 4; n++) begin
      cw_t x, y, z;
      x = cw_t'(sm_in[n].a);
      y = cw_t'(sm_in[n].b);
      z = cw_t'(dl[n]);
      sv[n] = x ^ y ^ z;
      cv[n] = ((x & y) | (x & z) | (y & z)) << 1;
      cand[n] = sv[n] + cv[n];
    end
  end

  hybrid_sub #(.W(CW)) u_hs01 (.a0(sv[0]), .b0(cv[0]), .a1(sv[1]), .b1(cv[1]), .d(d01));
  hybrid_sub #(.W(CW)) u_hs23 (.a0(sv[2]), .b0(cv[2]), .a1(sv[3]), .b1(cv[3]), .d(d23));
  glut #(.W(CW)) u_glut01 (.x(d01), .c(g01));
  glut #(.W(CW)) u_glut23 (.x(d23), .c(g23));

  assign sel01 = d01[CW-1];
  assign sel23 = d23[CW-1];
  assign c02 = cand[0] >= cand[2];
  assign c03 = cand[0] >= cand[3];
  assign c12 = cand[1] >= cand[2];
  assign c13 = cand[1] >= cand[3];

  always_comb begin
    unique case ({sel01, sel23})
      2'b00:   hi = ~c02;
      2'b01:   hi = ~c03;
      2'b10:   hi = ~c12;
      default: hi = ~c13;
    endcase
    if (hi) vmax = sel23 ? cand[3] : cand[2];
    else    vmax = sel01 ? cand[1] : cand[0];
    vnorm = norm ? vmax - cw_t'(NORM_SUB) : vmax;
    if (vnorm < 0)                       sm_out.a = '0;
    else if (vnorm > cw_t'(2**SMW - 1))  sm_out.a = '1;
    else                                 sm_out.a = vnorm[SMW-1:0];
    sm_out.b = hi ? g23 : g01;
    over = (cand[0] > cw_t'(NORM_THR)) | (cand[1] > cw_t'(NORM_THR)) |
           (cand[2] > cw_t'(NORM_THR)) | (cand[3] > cw_t'(NORM_THR));
  end
endmodule
