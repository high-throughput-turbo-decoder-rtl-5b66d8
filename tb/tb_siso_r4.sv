// tb_siso_r4: test of the sliding-window radix-4 SISO decoder at a reduced
// frame (K = 200 stages, window 16, so the last window is short).
//
// The testbench serves the SISO's two per-cycle symbol requests from arrays.
// Pass 1: a noiseless codeword of the component encoder with zero a-priori
// input; every LLR sign must equal the transmitted bit. Pass 2: noisy symbols
// and random a-priori values with the 0.75 scaling on; every extrinsic output
// must equal sat6(0.75 * (LLR - (1.5*ys + La))), recomputed here from the
// LLR. Both passes: each stage must be produced exactly once, and done must
// come (ceil(K/W) + 2) * W/2 + 3 cycles after start.
//
// Interface and timing: the requested symbols are returned in the same cycle, as the decoder core does.
// Reference values are computed here independently of the design;
// the stimulus, sizes and tolerances are this testbench's own choices.
module tb_siso_r4;
  import turbo_pkg::*;
  localparam int K = 200, W = 16, AW = $clog2(K);
  localparam int NWIN = ((K / 2) + (W / 2) - 1) / (W / 2);
  localparam int PASS = (NWIN + 2) * (W / 2) + 3;

  logic clk = 0, rst = 1, start = 0, scale = 0;
  logic busy, done, out_valid;
  logic [AW-1:0] req_k [2];
  sym_t sym [2];
  logic [AW-1:0] out_k [2];
  logic signed [LW-1:0] out_llr [2];
  ext_t out_le [2];

  soft_t ys [K], yp [K];
  ext_t  la [K];
  bit    u  [K];
  int checks = 0, failures = 0;

  siso_r4 #(.K(K), .W(W)) dut (.*);

  always #5 clk = ~clk;

  always_comb
    for (int n = 0; n < 2; n++) begin
      sym[n].ys = ys[req_k[n]];
      sym[n].yp = yp[req_k[n]];
      sym[n].la = la[req_k[n]];
    end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_frame(input int amp, input bit rand_la);
    bit [4:1] r;
    bit a, p;
    r = '0;
    for (int k = 0; k < K; k++) begin
      int vs, vp;
      u[k] = 1'($urandom_range(1, 0));
      a = u[k] ^ r[3] ^ r[4];
      p = a ^ r[1] ^ r[3] ^ r[4];
      r = {r[3:1], a};
      vs = (u[k] ? 4 : -4) + int'($urandom_range(2 * amp, 0)) - amp;
      vp = (p ? 4 : -4) + int'($urandom_range(2 * amp, 0)) - amp;
      ys[k] = soft_t'((vs > 15) ? 15 : (vs < -16) ? -16 : vs);
      yp[k] = soft_t'((vp > 15) ? 15 : (vp < -16) ? -16 : vp);
      la[k] = rand_la ? ext_t'($urandom_range(63, 0)) : '0;
    end
  endtask

  function automatic int ext_ref(input int llr, input int k, input bit sc);
    int e, x;
    x = ((3 * int'(ys[k])) >>> 1) + int'(la[k]);
    e = llr - x;
    if (sc) e = e - (e >>> 2);
    return (e > 31) ? 31 : (e < -32) ? -32 : e;
  endfunction

  task automatic run_pass(input bit sc, input bit check_bits);
    int seen [K];
    int t;
    foreach (seen[k]) seen[k] = 0;
    @(negedge clk);
    start = 1; scale = sc;
    @(negedge clk);
    start = 0;
    t = 1;
    while (!done) begin
      if (out_valid)
        for (int n = 0; n < 2; n++) begin
          int k;
          k = int'(out_k[n]);
          seen[k]++;
          if (check_bits) begin
            checks++;
            if ((out_llr[n] >= 0) != u[k]) begin
              failures++;
              if (failures < 10) $display("FAIL bit %0d llr=%0d u=%0b", k, out_llr[n], u[k]);
            end
          end
          checks++;
          if (int'(out_le[n]) != ext_ref(int'(out_llr[n]), k, sc)) begin
            failures++;
            if (failures < 10) $display("FAIL Le %0d: got %0d exp %0d", k, out_le[n],
                                        ext_ref(int'(out_llr[n]), k, sc));
          end
        end
      @(negedge clk);
      t++;
    end
    for (int k = 0; k < K; k++) begin
      checks++;
      if (seen[k] != 1) begin
        failures++;
        $display("FAIL stage %0d produced %0d times", k, seen[k]);
      end
    end
    checks++;
    if (t != PASS) begin
      failures++;
      $display("FAIL pass took %0d cycles, expected %0d", t, PASS);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    make_frame(0, 1'b0);
    run_pass(1'b0, 1'b1);
    make_frame(4, 1'b1);
    run_pass(1'b1, 1'b0);
    make_frame(2, 1'b0);
    run_pass(1'b0, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
