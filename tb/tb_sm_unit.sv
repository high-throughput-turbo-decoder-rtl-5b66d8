// tb_sm_unit: random test of the forward and backward 16-state radix-4
// recursion units. The reference derives the trellis from the CCSDS
// component encoder (feedback 1+D^3+D^4, parity 1+D+D^3+D^4), applied twice,
// and checks each new metric's value against the maximum of its four
// candidates (with the common normalization), the normalization flag against
// "some candidate above 960", and that the register follows nxt when enabled
// and holds otherwise.
//
// Interface and timing: one radix-4 step per clock when enabled.
// Reference values are computed here independently of the design;
// the stimulus, sizes and tolerances are this testbench's own choices.
module tb_sm_unit;
  import turbo_pkg::*;
  logic clk = 0, rst = 1, en = 0, init_sel = 0;
  sm_t    init [NSTATE];
  delta_t dl [16];
  sm_t    fcur [NSTATE], fnxt [NSTATE], fheld [NSTATE];
  sm_t    bcur [NSTATE], bnxt [NSTATE], bheld [NSTATE];
  logic   fnorm, bnorm;
  int checks = 0, failures = 0;

  sm_unit #(.FWD(1'b1)) dut_f (.clk, .rst, .en, .init_sel, .init, .dl,
                              .cur(fcur), .nxt(fnxt), .held(fheld), .norm(fnorm));
  sm_unit #(.FWD(1'b0)) dut_b (.clk, .rst, .en, .init_sel, .init, .dl,
                              .cur(bcur), .nxt(bnxt), .held(bheld), .norm(bnorm));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Encoder step on state {r1,r2,r3,r4}: returns {parity, next state}.
  function automatic logic [4:0] enc(input logic [3:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a ^ s[3] ^ s[1] ^ s[0], a, s[3], s[2], s[1]};
  endfunction

  task automatic check_dir(input bit fwd, input sm_t cur [NSTATE], input sm_t nxt [NSTATE],
                           input logic nrm);
    int best [NSTATE];
    bit any_over;
    for (int s = 0; s < NSTATE; s++) best[s] = -100000;
    any_over = 0;
    for (int s2 = 0; s2 < 16; s2++)
      for (int uu = 0; uu < 4; uu++) begin
        logic [4:0] e1, e2;
        int lab, src, dst, cnd;
        e1 = enc(4'(s2), uu[1]);
        e2 = enc(e1[3:0], uu[0]);
        lab = {uu[1] ^ e1[4], uu[1], uu[0] ^ e2[4], uu[0]};
        src = fwd ? s2 : int'(e2[3:0]);
        dst = fwd ? int'(e2[3:0]) : s2;
        cnd = int'(cur[src].a) + int'(cur[src].b) + int'(dl[lab]);
        if (cnd > 960) any_over = 1;
        if (cnd > best[dst]) best[dst] = cnd;
      end
    checks++;
    if (nrm != any_over) begin
      failures++;
      $display("FAIL fwd=%0b norm=%0b exp %0b", fwd, nrm, any_over);
    end
    for (int s = 0; s < NSTATE; s++) begin
      int e;
      e = best[s] - (any_over ? 256 : 0);
      e = (e < 0) ? 0 : (e > 1023) ? 1023 : e;
      checks++;
      if (int'(nxt[s].a) != e) begin
        failures++;
        if (failures < 10) $display("FAIL fwd=%0b state %0d got %0d exp %0d", fwd, s, nxt[s].a, e);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 400; n++) begin
      sm_t fsave [NSTATE], bsave [NSTATE];
      init_sel = (n % 10 == 0);
      en       = (n % 7 != 3);
      for (int s = 0; s < NSTATE; s++) begin
        init[s].a = SMW'($urandom_range((n % 4 == 0) ? 1000 : 400, 0));
        init[s].b = 2'($urandom_range(3, 0));
      end
      for (int i = 0; i < 16; i++) dl[i] = delta_t'(int'($urandom_range(160, 0)) - 80);
      #1;
      check_dir(1'b1, fcur, fnxt, fnorm);
      check_dir(1'b0, bcur, bnxt, bnorm);
      fsave = en ? fnxt : fheld;
      bsave = en ? bnxt : bheld;
      @(negedge clk);
      checks++;
      if (fheld != fsave || bheld != bsave) begin
        failures++;
        $display("FAIL register update at step %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
