// tb_ccsds_perm_gen: checks the generated interleaver against the CCSDS
// permutation formula, evaluated directly, for the 1784- and 3568-bit
// frames, that it is a permutation, and that it takes exactly K cycles.
//
// Interface and timing: one start pulse per frame size; pairs sampled on each clock with valid.
// Reference values are computed here independently of the design;
// the stimulus, sizes and tolerances are this testbench's own choices.
module tb_ccsds_perm_gen;
  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ccsds_pi(input int s, input int k1, input int k2);
    int p [8] = '{31, 37, 43, 47, 53, 59, 61, 67};
    int m, i, j, t, q, c;
    m = (s - 1) % 2;
    i = (s - 1) / (2 * k2);
    j = (s - 1) / 2 - i * k2;
    t = (19 * i + 1) % (k1 / 2);
    q = t % 8 + 1;
    c = (p[q - 1] * j + 21 * m) % k2;
    return 2 * (t + c * (k1 / 2) + 1) - m;
  endfunction

  logic s1, v1, d1, s2, v2, d2;
  logic [10:0] i1, p1;
  logic [11:0] i2, p2;

  ccsds_perm_gen #(.K1(8), .K2(223)) dut1 (.clk, .rst, .start(s1), .valid(v1), .idx(i1), .perm(p1), .done(d1));
  ccsds_perm_gen #(.K1(8), .K2(446)) dut2 (.clk, .rst, .start(s2), .valid(v2), .idx(i2), .perm(p2), .done(d2));

  task automatic run(input int which, input int k2);
    int k, n;
    bit seen [int];
    k = 8 * k2;
    n = 0;
    @(negedge clk);
    if (which == 1) s1 = 1; else s2 = 1;
    @(negedge clk);
    s1 = 0; s2 = 0;
    forever begin
      logic v, d;
      int idx, pm;
      v = (which == 1) ? v1 : v2;
      d = (which == 1) ? d1 : d2;
      idx = (which == 1) ? int'(i1) : int'(i2);
      pm  = (which == 1) ? int'(p1) : int'(p2);
      if (d) break;
      if (v) begin
        checks++;
        if (idx != n || pm != ccsds_pi(n + 1, 8, k2) - 1 || seen.exists(pm)) begin
          failures++;
          if (failures < 10) $display("FAIL K=%0d s=%0d idx=%0d perm=%0d exp=%0d", k, n + 1, idx, pm,
                                      ccsds_pi(n + 1, 8, k2) - 1);
        end
        seen[pm] = 1;
        n++;
      end
      @(negedge clk);
    end
    checks++;
    if (n != k || seen.num() != k) begin
      failures++;
      $display("FAIL K=%0d produced %0d addresses", k, n);
    end
  endtask

  initial begin
    s1 = 0; s2 = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    run(1, 223);
    run(2, 446);
    run(1, 223);      // a second pass restarts cleanly
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
