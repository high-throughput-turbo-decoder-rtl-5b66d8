// lcu_r4: radix-4 LLR computation unit. Produces the log-likelihood ratios of
// both bits of a radix-4 step, u(k-1) and u(k), in one cycle.
//
// Each of the 64 radix-4 paths (16 start states x 4 input pairs) gets the
// metric alpha(k-2, s2) + delta + beta(k, s), with both state metrics
// expanded from their OACS form (a + b). For each bit the 32 paths with that
// bit equal to 1 and the 32 with it equal to 0 go through a five-level tree
// of max* units, and the two results are subtracted. The subtraction result
// is registered (one cycle of latency); the path sums and the max* tree in
// front of it are combinational.
//
// Interface: alpha = metrics at the start of the step, beta = metrics at its
// end, dl = radix-4 branch metrics from bmu_r4. llr0 belongs to stage k-1,
// llr1 to stage k; both valid one cycle after the inputs. Positive LLR means
// bit 1.
//
// Design basis: the adders, the max* tree per bit, the final subtraction and
// its output register follow the reference design; having no other register
// inside the tree is this design's choice.
module lcu_r4
  import turbo_pkg::*;
(
  input  logic   clk,
  input  sm_t    alpha [NSTATE],
  input  sm_t    beta  [NSTATE],
  input  delta_t dl    [16],
  output logic signed [LW-1:0] llr0,
  output logic signed [LW-1:0] llr1
);
  typedef logic signed [LW-1:0] lw_t;

  // Tree inputs: t[bit][value][i], i = 0..31.
  lw_t lev0 [2][2][32];

  for (genvar s2 = 0; s2 < NSTATE; s2++) begin : g_s2
    for (genvar uu = 0; uu < 4; uu++) begin : g_uu
      localparam logic [3:0] DST = r4_next(4'(s2), 2'(uu));
      localparam logic [3:0] LAB = r4_label(4'(s2), 2'(uu));
      lw_t pm;
      assign pm = lw_t'(alpha[s2].a) + lw_t'(alpha[s2].b) + lw_t'(dl[LAB])
                + lw_t'(beta[DST].a) + lw_t'(beta[DST].b);
      // Bit k-1 is uu[1], bit k is uu[0]. Each (bit, value) class holds 32 paths.
      assign lev0[0][uu/2][s2*2 + (uu%2)] = pm;
      assign lev0[1][uu%2][s2*2 + (uu/2)] = pm;
    end
  end

  lw_t root [2][2];

  for (genvar bt = 0; bt < 2; bt++) begin : g_bit
    for (genvar v = 0; v < 2; v++) begin : g_val
      lw_t l1 [16];
      lw_t l2 [8];
      lw_t l3 [4];
      lw_t l4 [2];
      for (genvar i = 0; i < 16; i++) begin : g_l1
        max_star #(.W(LW)) u (.a(lev0[bt][v][2*i]), .b(lev0[bt][v][2*i+1]), .y(l1[i]));
      end
      for (genvar i = 0; i < 8; i++) begin : g_l2
        max_star #(.W(LW)) u (.a(l1[2*i]), .b(l1[2*i+1]), .y(l2[i]));
      end
      for (genvar i = 0; i < 4; i++) begin : g_l3
        max_star #(.W(LW)) u (.a(l2[2*i]), .b(l2[2*i+1]), .y(l3[i]));
      end
      for (genvar i = 0; i < 2; i++) begin : g_l4
        max_star #(.W(LW)) u (.a(l3[2*i]), .b(l3[2*i+1]), .y(l4[i]));
      end
      max_star #(.W(LW)) u_root (.a(l4[0]), .b(l4[1]), .y(root[bt][v]));
    end
  end

  always_ff @(posedge clk) begin
    llr0 <= root[0][1] - root[0][0];
    llr1 <= root[1][1] - root[1][0];
  end
endmodule
