// turbo_pkg: widths, number formats and trellis functions shared by the
// CCSDS radix-4 turbo decoder.
//
// Number formats (two's complement, values in units of 0.25):
//   channel soft inputs  5 bits, 3 integer + 2 fraction bits
//   extrinsic / a-priori 6 bits, 4 integer + 2 fraction bits
//   state metrics        10 bits unsigned (8 integer + 2 fraction), kept as an
//                        OACS pair: selected value A plus a 2-bit offset B
// The 16-state component code has feedback 1+D^3+D^4 and parity
// 1+D+D^3+D^4 (the CCSDS G0 and G1 connection vectors). The encoder state is
// {r1,r2,r3,r4}, r1 being the most recent feedback bit. An information bit 1
// is sent as +1, a 0 as -1; the same mapping holds for parity bits.
// Radix-2 branch labels are idx = {xs ^ xp, xs} (xs, xp = 1 for +1), which
// makes label 0 the negation of label 1 and label 2 the negation of label 3.
// Radix-4 labels are {idx(k-1), idx(k)}: the earlier stage is the MSB pair.
//
// Design basis: the widths (5-bit inputs, 6-bit extrinsic, 10-bit metrics),
// the generator polynomials and the normalization constants follow the reference
// design; the state and label numbering and the start value 256 are this
// design's choices.
package turbo_pkg;

  localparam int unsigned NSTATE = 16;
  localparam int unsigned YW     = 5;    // channel soft input width
  localparam int unsigned LEW    = 6;    // extrinsic / a-priori width
  localparam int unsigned SMW    = 10;   // state metric width (unsigned)
  localparam int unsigned CW     = 12;   // candidate metric width (signed)
  localparam int unsigned DW     = 9;    // radix-4 branch metric width (signed)
  localparam int unsigned LW     = 14;   // LLR datapath width (signed)
  localparam int unsigned XW     = 8;    // Lc*ys + La width (signed)

  // Normalization: when a candidate exceeds NORM_THR all new metrics drop by NORM_SUB.
  localparam int unsigned NORM_THR = 960;
  localparam int unsigned NORM_SUB = 256;
  // Start value of the known state (alpha) and of every state (uniform beta).
  localparam int unsigned SM_INIT  = 256;

  typedef logic signed [YW-1:0]  soft_t;
  typedef logic signed [LEW-1:0] ext_t;
  typedef logic signed [DW-1:0]  delta_t;

  // One trellis stage worth of decoder input.
  typedef struct packed {
    soft_t ys;   // systematic
    soft_t yp;   // parity of the component code being decoded
    ext_t  la;   // a-priori information
  } sym_t;

  // State metric in OACS form: value = a + b.
  typedef struct packed {
    logic [SMW-1:0] a;
    logic [1:0]     b;
  } sm_t;

  function automatic logic [3:0] next_state(input logic [3:0] s, input logic u);
    logic fb;
    fb = u ^ s[1] ^ s[0];              // u ^ r3 ^ r4
    return {fb, s[3], s[2], s[1]};
  endfunction

  function automatic logic parity_bit(input logic [3:0] s, input logic u);
    logic fb;
    fb = u ^ s[1] ^ s[0];
    return fb ^ (^(s & 4'b1011));     // taps D^0, D^1, D^3, D^4
  endfunction

  function automatic logic [1:0] r2_label(input logic [3:0] s, input logic u);
    return {u ^ parity_bit(s, u), u};
  endfunction

  // Radix-4 transition from s2 (state at k-2) with inputs {u(k-1), u(k)} = uu.
  function automatic logic [3:0] r4_next(input logic [3:0] s2, input logic [1:0] uu);
    return next_state(next_state(s2, uu[1]), uu[0]);
  endfunction

  function automatic logic [3:0] r4_label(input logic [3:0] s2, input logic [1:0] uu);
    logic [3:0] s1;
    s1 = next_state(s2, uu[1]);
    return {r2_label(s2, uu[1]), r2_label(s1, uu[0])};
  endfunction

  // n-th (0..3) radix-4 predecessor of state s, in ascending (s2, uu) order.
  function automatic logic [5:0] r4_pred(input int s, input int n);
    int cnt;
    logic [5:0] res;
    cnt = 0;
    res = '0;
    for (int s2 = 0; s2 < 16; s2++)
      for (int uu = 0; uu < 4; uu++)
        if (int'(r4_next(4'(s2), 2'(uu))) == s) begin
          if (cnt == n) res = {4'(s2), 2'(uu)};
          cnt++;
        end
    return res;  // {predecessor state, input pair}
  endfunction

endpackage
