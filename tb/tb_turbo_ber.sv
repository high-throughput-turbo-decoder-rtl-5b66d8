// tb_turbo_ber: bit error rate and average iteration count of the turbo
// decoder at its default size (K = 1784, rate 1/3) over an AWGN channel with
// BPSK, at several Eb/N0 points.
//
// Each frame is random data encoded by the testbench's own CCSDS turbo
// encoder model (two 16-state recursive encoders, the permutation evaluated
// from its defining formula). Every code bit is sent as +/-1.0 plus Gaussian
// noise of variance 1/(2*R*Eb/N0), R = 1/3, drawn with the Box-Muller
// method, and quantized to the decoder's 5-bit input (units of 0.25,
// -4.0..+3.75). The testbench prints BER and average iterations per point and
// checks that
//   - the BER does not rise with Eb/N0 and stays below the raw channel BER,
//   - at the highest point every frame is decoded without errors and the
//     HDA2 rule stops early on average,
//   - at the lowest point the iteration count averages above the minimum (the
//     early-stop rule must actually wait for agreement).
//
// Interface and timing: one symbol triple per clock while in_valid is high;
// outputs collected while out_valid is high.
// Reference values are computed here independently of the design; the
// Eb/N0 points, frame counts and bounds are this testbench's own choices.
// Typical result: the error rate falls steeply between 0.0 and 1.0 dB; from
// 1.0 dB on, frames are decoded without errors in 3 to 4 iterations on
// average.
module tb_turbo_ber;
  import turbo_pkg::*;

  localparam int K1 = 8, K2 = 223, K = K1 * K2, MAXI = 8;
  localparam int NPT = 4, NFRAMES = 6;
  localparam real EBN0_DB [NPT] = '{0.0, 0.5, 1.0, 1.5};

  logic clk = 1'b0, rst = 1'b1, enable = 1'b1, in_valid = 1'b0;
  soft_t systematic = '0, parity1 = '0, parity2 = '0;
  logic in_ready, out_valid, decoder_out;
  logic [4:0] iteration;

  turbo_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Watchdog.
  initial begin
    repeat (NPT * NFRAMES * (K + 2 * MAXI * 940 + K + 100)) @(posedge clk);
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

  bit u [K], par1 [K], par2 [K], ub [K], dec [K];

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

  function automatic real uniform01();
    int unsigned r;
    r = $urandom;
    return (real'(r) + 1.0) / 4294967297.0;   // (0, 1)
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = uniform01();
    u2 = uniform01();
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic soft_t tx(input bit b, input real sigma);
    real v;
    int q;
    v = (b ? 1.0 : -1.0) + sigma * gauss();
    q = $rtoi($floor(v * 4.0 + 0.5));
    if (q > 15) q = 15;
    if (q < -16) q = -16;
    return soft_t'(q);
  endfunction

  real ber [NPT], raw_ber [NPT], avg_it [NPT];
  int  frame_err_free [NPT];

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int pt = 0; pt < NPT; pt++) begin
      real sigma;
      int errs_tot, raw_tot, it_tot;
      sigma = $sqrt(1.0 / (2.0 * (1.0 / 3.0) * $pow(10.0, EBN0_DB[pt] / 10.0)));
      errs_tot = 0; raw_tot = 0; it_tot = 0; frame_err_free[pt] = 0;
      for (int f = 0; f < NFRAMES; f++) begin
        int nout, errs;
        for (int k = 0; k < K; k++) u[k] = 1'($urandom_range(1, 0));
        for (int s = 1; s <= K; s++) ub[s - 1] = u[ccsds_pi(s) - 1];
        rsc(u, par1);
        rsc(ub, par2);
        wait (in_ready);
        @(negedge clk);
        for (int k = 0; k < K; k++) begin
          in_valid   = 1'b1;
          systematic = tx(u[k], sigma);
          parity1    = tx(par1[k], sigma);
          parity2    = tx(par2[k], sigma);
          if ((systematic >= 0) != u[k]) raw_tot++;
          @(negedge clk);
        end
        in_valid = 1'b0;
        nout = 0;
        while (nout < K) begin
          @(posedge clk);
          #1;
          if (out_valid) begin
            dec[nout] = decoder_out;
            nout++;
          end
        end
        errs = 0;
        for (int k = 0; k < K; k++) if (dec[k] != u[k]) errs++;
        errs_tot += errs;
        it_tot   += int'(iteration);
        if (errs == 0) frame_err_free[pt]++;
      end
      ber[pt]     = real'(errs_tot) / real'(NFRAMES * K);
      raw_ber[pt] = real'(raw_tot) / real'(NFRAMES * K);
      avg_it[pt]  = real'(it_tot) / real'(NFRAMES);
      $display("Eb/N0 = %.1f dB: BER = %.2e (%0d bits) raw BER = %.3f, average iterations = %.2f, error-free frames %0d of %0d",
               EBN0_DB[pt], ber[pt], errs_tot, raw_ber[pt], avg_it[pt], frame_err_free[pt], NFRAMES);
      check(ber[pt] < raw_ber[pt], $sformatf("%.1f dB: BER below the channel's", EBN0_DB[pt]));
      if (pt > 0) check(ber[pt] <= ber[pt - 1], $sformatf("%.1f dB: BER does not rise with Eb/N0", EBN0_DB[pt]));
    end
    check(frame_err_free[NPT - 1] == NFRAMES, "highest Eb/N0: all frames error free");
    check(avg_it[NPT - 1] < real'(MAXI), "highest Eb/N0: early stop on average");
    check(avg_it[0] > avg_it[NPT - 1], "iterations fall as Eb/N0 rises");
    check(avg_it[0] > 2.0, "lowest Eb/N0: more than the minimum iterations on average");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
