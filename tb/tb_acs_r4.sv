// tb_acs_r4: random test of one radix-4 OACS node. The reference forms the
// four candidates a + b + delta directly, takes the maximum (ties to the lower
// index), the correction of the winning pair from ln(1+exp(-|d|)) rounded to
// the design's table, applies the -256 normalization and the 0..1023 clamp,
// and flags candidates above 960.
//
// Interface and timing: combinational DUT, inputs applied and outputs compared after #1.
// Reference values are computed here independently of the design;
// the stimulus, sizes and tolerances are this testbench's own choices.
module tb_acs_r4;
  import turbo_pkg::*;
  sm_t    sm_in [4];
  delta_t dl [4];
  logic   norm, over;
  sm_t    sm_out;
  int checks = 0, failures = 0;

  acs_r4 dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int corr(input int d);
    int m;
    m = (d < 0) ? -d : d;
    if (m >= 8) return 0;
    if (m == 0) return 3;
    if (m < 4)  return 2;
    return 1;
  endfunction

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int cand [4];
      int w01, w23, win, vmax, ea, eb;
      bit eover;
      for (int i = 0; i < 4; i++) begin
        sm_in[i].a = SMW'($urandom_range((n % 3 == 0) ? 1023 : 300, 0));
        sm_in[i].b = 2'($urandom_range(3, 0));
        dl[i]      = delta_t'(int'($urandom_range(160, 0)) - 80);
        if (n % 5 == 0) begin          // near ties
          sm_in[i].a = sm_in[0].a + SMW'($urandom_range(3, 0));
        end
      end
      norm = 1'($urandom_range(1, 0));
      #1;
      eover = 0;
      for (int i = 0; i < 4; i++) begin
        cand[i] = int'(sm_in[i].a) + int'(sm_in[i].b) + int'(dl[i]);
        if (cand[i] > 960) eover = 1;
      end
      w01 = (cand[1] > cand[0]) ? 1 : 0;
      w23 = (cand[3] > cand[2]) ? 3 : 2;
      win = (cand[w23] > cand[w01]) ? w23 : w01;
      vmax = cand[win] - (norm ? 256 : 0);
      ea = (vmax < 0) ? 0 : (vmax > 1023) ? 1023 : vmax;
      eb = (win < 2) ? corr(cand[0] - cand[1]) : corr(cand[2] - cand[3]);
      checks++;
      if (int'(sm_out.a) != ea || int'(sm_out.b) != eb || over != eover) begin
        failures++;
        if (failures < 10)
          $display("FAIL cand=%0d,%0d,%0d,%0d norm=%0b: got a=%0d b=%0d over=%0b exp a=%0d b=%0d over=%0b",
                   cand[0], cand[1], cand[2], cand[3], norm, sm_out.a, sm_out.b, over, ea, eb, eover);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
