// tb_turbo_decoder: end-to-end test of the CCSDS turbo decoder at its
// default size (K = 1784, window 32, up to 8 iterations).
//
// The testbench holds its own model of the CCSDS rate-1/3 turbo encoder: two
// 16-state recursive encoders (feedback 1+D^3+D^4, parity 1+D+D^3+D^4) and the
// CCSDS permutation evaluated straight from its defining formula. Random
// information frames are encoded, mapped to +/-1.0 (4 units of 0.25), given
// approximately Gaussian noise (sum of uniform samples) and sent to the
// decoder. Frames:
//   1. noiseless           -> must stop early (HDA2) after 2 iterations, 0 errors
//   2. moderate noise      -> must stop early and decode without errors
//   3. heavy noise         -> must leave at most a tenth of the channel's errors
//   4. pure noise, no code -> must run to the iteration limit (8)
// Checked as well: the number of cycles from the end of loading to the first
// output against the schedule (two SISO passes of (ceil(K/W)+2)*W/2 cycles
// per iteration plus a few control cycles), and that normalization, the
// 0.75 extrinsic scaling, unscaled iterations, early stop and the iteration
// limit each happened.
//
// Interface and timing: one symbol triple per clock while in_valid is high; outputs collected while out_valid is high.
// Reference values are computed here independently of the design;
// the stimulus, sizes and tolerances are this testbench's own choices.
module tb_turbo_decoder;
  import turbo_pkg::*;

  localparam int K1 = 8, K2 = 223, K = K1 * K2, W = 32, MAXI = 8;
  localparam int NWIN = ((K / 2) + (W / 2) - 1) / (W / 2);
  localparam int PASS = (NWIN + 2) * (W / 2);

  logic clk = 1'b0, rst = 1'b1, enable = 1'b1, in_valid = 1'b0;
  soft_t systematic = '0, parity1 = '0, parity2 = '0;
  logic in_ready, out_valid, decoder_out;
  logic [4:0] iteration;

  turbo_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // Watchdog.
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- reference encoder -------------------------------------------------
  function automatic int ccsds_pi(input int s);   // 1-based in and out
    int p [8] = '{31, 37, 43, 47, 53, 59, 61, 67};
    int m, i, j, t, q, c;
    m = (s - 1) % 2;
    i = (s - 1) / (2 * K2);
    j = (s - 1) / 2 - i * K2;
    t = (19 * i + 1) % (K1 / 2);
    q = t % 8 + 1;
    c = (p[q - 1] * j + 21 * m) % K2;
    return 2 * (t + c * (K1 / 2) + 1) - m;
  endfunction

  bit u   [K];
  bit par1 [K], par2 [K];

  task automatic rsc(input bit in [K], output bit par [K]);
    bit [4:1] r;
    bit a;
    r = '0;
    for (int k = 0; k < K; k++) begin
      a      = in[k] ^ r[3] ^ r[4];
      par[k] = a ^ r[1] ^ r[3] ^ r[4];
      r      = {r[3:1], a};
    end
  endtask

  task automatic encode();
    bit ub [K];
    for (int s = 1; s <= K; s++) ub[s - 1] = u[ccsds_pi(s) - 1];
    rsc(u, par1);
    rsc(ub, par2);
  endtask

  function automatic int noise(input int amp);   // roughly Gaussian, sigma ~ amp/2
    int n;
    n = 0;
    for (int x = 0; x < 3; x++) n += $urandom_range(2 * amp, 0) - amp;
    return n / 2;
  endfunction

  function automatic soft_t quant(input int v);
    if (v > 15) return soft_t'(15);
    if (v < -16) return soft_t'(-16);
    return soft_t'(v);
  endfunction

  function automatic soft_t tx(input bit b, input int amp, input bit coded);
    int v;
    v = coded ? (b ? 4 : -4) : 0;
    return quant(v + noise(amp));
  endfunction

  // ---- mechanism counters --------------------------------------------------
  int n_norm = 0, n_scaled = 0, n_unscaled = 0, n_early = 0, n_limit = 0;
  always @(posedge clk) begin
    if ((dut.u_siso.a_act && dut.u_siso.a_norm) || (dut.u_siso.b_act && dut.u_siso.b_norm) ||
        (dut.u_siso.d_act && dut.u_siso.d_norm)) n_norm++;
    if (dut.siso_start && dut.siso_scale)  n_scaled++;
    if (dut.siso_start && !dut.siso_scale) n_unscaled++;
  end

  // ---- one frame ------------------------------------------------------------
  task automatic run_frame(input int amp, input bit coded, input int exp_iter_max,
                           input bit expect_limit, input bit expect_clean, input string name);
    bit dec [K];
    int t_load, t_out, errs, raw_errs, nout, its;
    for (int k = 0; k < K; k++) u[k] = 1'($urandom_range(1, 0));
    encode();
    raw_errs = 0;
    wait (in_ready);
    @(negedge clk);
    for (int k = 0; k < K; k++) begin
      in_valid   = 1'b1;
      systematic = tx(u[k], amp, coded);
      parity1    = tx(par1[k], amp, coded);
      parity2    = tx(par2[k], amp, coded);
      if ((systematic >= 0) != u[k]) raw_errs++;
      @(negedge clk);
    end
    in_valid = 1'b0;
    t_load = cyc;
    nout = 0;
    while (nout < K) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        if (nout == 0) t_out = cyc;
        dec[nout] = decoder_out;
        nout++;
      end
    end
    its  = int'(iteration);
    errs = 0;
    for (int k = 0; k < K; k++) if (dec[k] != u[k]) errs++;
    $display("%s: iterations=%0d bit_errors=%0d channel_errors=%0d cycles=%0d",
             name, its, errs, raw_errs, t_out - t_load);
    if (its < MAXI) n_early++; else n_limit++;
    check(its <= exp_iter_max, {name, ": iteration count"});
    check(!expect_limit || its == MAXI, {name, ": must reach the iteration limit"});
    if (expect_clean) check(errs == 0, {name, ": decoded bits"});
    else if (coded)   check(errs * 10 <= raw_errs, {name, ": decoder removes most channel errors"});
    // Two passes per iteration; each pass PASS cycles plus a small overhead.
    check((t_out - t_load) >= its * 2 * PASS && (t_out - t_load) <= its * 2 * (PASS + 6) + 6,
          {name, ": decoding cycle count"});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    run_frame(0, 1'b1, 2, 1'b0, 1'b1, "noiseless");
    run_frame(3, 1'b1, 4, 1'b0, 1'b1, "moderate noise");
    run_frame(8, 1'b1, MAXI, 1'b0, 1'b0, "heavy noise");
    run_frame(6, 1'b0, MAXI, 1'b1, 1'b0, "pure noise");
    $display("mechanisms: normalizations=%0d scaled_passes=%0d unscaled_passes=%0d early_stops=%0d limit_stops=%0d",
             n_norm, n_scaled, n_unscaled, n_early, n_limit);
    check(n_norm > 0, "state metric normalization happened");
    check(n_scaled > 0, "scaled (0.75) extrinsic pass happened");
    check(n_unscaled > 0, "unscaled extrinsic pass happened");
    check(n_early > 0, "HDA2 early stop happened");
    check(n_limit > 0, "iteration-limit stop happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
