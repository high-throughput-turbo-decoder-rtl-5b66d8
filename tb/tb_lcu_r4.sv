// tb_lcu_r4: random test of the radix-4 LLR unit. The reference enumerates
// the 64 radix-4 paths from the CCSDS component encoder and computes, for each
// of the two bits, the exact log-MAP LLR ln(sum exp(m) | bit=1) -
// ln(sum exp(m) | bit=0) in floating point (metrics in units of 0.25). The
// unit's max* tree with its table-rounded correction must come within 1.0
// (4 units); with one dominant path the LLR signs must equal that path's bits.
//
// Interface and timing: inputs set before a clock edge, LLRs read after it (one cycle of latency).
// Reference values are computed here independently of the design;
// the stimulus, sizes and tolerances are this testbench's own choices.
module tb_lcu_r4;
  import turbo_pkg::*;
  logic clk = 0;
  sm_t    alpha [NSTATE], beta [NSTATE];
  delta_t dl [16];
  logic signed [LW-1:0] llr0, llr1;
  int checks = 0, failures = 0;

  lcu_r4 dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4:0] enc(input logic [3:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a ^ s[3] ^ s[1] ^ s[0], a, s[3], s[2], s[1]};
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      real sum [2][2];
      int  best, bs2, buu;
      bit  dom;
      real ref0, ref1;
      dom = (n % 4 == 0);
      for (int s = 0; s < NSTATE; s++) begin
        alpha[s].a = SMW'($urandom_range(60, 0) + 300); alpha[s].b = 2'($urandom_range(3, 0));
        beta[s].a  = SMW'($urandom_range(60, 0) + 300); beta[s].b  = 2'($urandom_range(3, 0));
      end
      for (int i = 0; i < 16; i++) dl[i] = delta_t'(int'($urandom_range(80, 0)) - 40);
      if (dom) begin
        // One path s2 -> s gets both a large alpha and a large beta.
        int ds2, duu;
        logic [4:0] f1, f2;
        ds2 = $urandom_range(15, 0);
        duu = $urandom_range(3, 0);
        f1 = enc(4'(ds2), 1'(duu >> 1));
        f2 = enc(f1[3:0], 1'(duu));
        alpha[ds2].a = 700;
        beta[f2[3:0]].a = 700;
      end
      @(negedge clk);
      sum = '{'{0.0, 0.0}, '{0.0, 0.0}};
      best = -1000000; bs2 = 0; buu = 0;
      for (int s2 = 0; s2 < 16; s2++)
        for (int uu = 0; uu < 4; uu++) begin
          logic [4:0] e1, e2;
          int lab, m;
          e1 = enc(4'(s2), uu[1]);
          e2 = enc(e1[3:0], uu[0]);
          lab = {uu[1] ^ e1[4], uu[1], uu[0] ^ e2[4], uu[0]};
          m = int'(alpha[s2].a) + int'(alpha[s2].b) + int'(dl[lab]) +
              int'(beta[e2[3:0]].a) + int'(beta[e2[3:0]].b);
          if (m > best) begin best = m; bs2 = s2; buu = uu; end
          sum[0][uu[1]] += $exp((m - 1000) / 4.0);
          sum[1][uu[0]] += $exp((m - 1000) / 4.0);
        end
      ref0 = 4.0 * ($ln(sum[0][1]) - $ln(sum[0][0]));
      ref1 = 4.0 * ($ln(sum[1][1]) - $ln(sum[1][0]));
      @(posedge clk);
      #1;
      checks += 2;
      if (llr0 - ref0 > 4.0 || ref0 - llr0 > 4.0) begin
        failures++;
        if (failures < 10) $display("FAIL llr0=%0d ref=%f", llr0, ref0);
      end
      if (llr1 - ref1 > 4.0 || ref1 - llr1 > 4.0) begin
        failures++;
        if (failures < 10) $display("FAIL llr1=%0d ref=%f", llr1, ref1);
      end
      if (dom) begin
        checks++;
        if ((llr0 >= 0) != buu[1] || (llr1 >= 0) != buu[0]) begin
          failures++;
          $display("FAIL dominant path s2=%0d uu=%0d llr=%0d,%0d", bs2, buu, llr0, llr1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
