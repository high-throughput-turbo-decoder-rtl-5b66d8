// tb_turbo_lengths: the turbo decoder built for the other CCSDS frame
// lengths with the 8-column interleaver: K = 3568, 7136 and 8920 bits
// (K2 = 446, 892, 1115), three decoders side by side.
//
// For each length the testbench encodes random frames with its own model of
// the CCSDS rate-1/3 turbo encoder (two 16-state recursive encoders and the
// permutation evaluated from its defining formula), adds approximately
// Gaussian noise, and checks that
//   - a noiseless frame and a lightly noisy frame (under 1% raw bit errors)
//     are decoded without errors, stopping early by the HDA2 rule,
//   - a heavily noisy frame (about 16% raw bit errors) leaves at most a
//     tenth of the channel's errors,
//   - the time from the end of loading to the first output equals two
//     SISO passes of (ceil(K/W)+2)*W/2 cycles per iteration plus a few
//     control cycles.
//
// Interface and timing: one symbol triple per clock while in_valid is high;
// outputs collected while out_valid is high. The three decoders run at the
// same time on a shared clock.
// Reference values are computed here independently of the design; the
// stimulus, sizes and tolerances are this testbench's own choices.
module tb_turbo_lengths;
  import turbo_pkg::*;

  localparam int K1 = 8, W = 32, MAXI = 8, NLEN = 3;
  localparam int K2S [NLEN] = '{446, 892, 1115};

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  bit finished [NLEN];

  // Watchdog.
  initial begin
    repeat (600000) @(posedge clk);
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

  function automatic int noise(input int amp);   // roughly Gaussian, sigma ~ amp/2
    int n;
    n = 0;
    for (int x = 0; x < 3; x++) n += $urandom_range(2 * amp, 0) - amp;
    return n / 2;
  endfunction

  function automatic soft_t tx(input bit b, input int amp);
    int v;
    v = (b ? 4 : -4) + noise(amp);
    if (v > 15) v = 15;
    if (v < -16) v = -16;
    return soft_t'(v);
  endfunction

  for (genvar g = 0; g < NLEN; g++) begin : g_len
    localparam int K2   = K2S[g];
    localparam int K    = K1 * K2;
    localparam int NWIN = ((K / 2) + (W / 2) - 1) / (W / 2);
    localparam int PASS = (NWIN + 2) * (W / 2);

    logic enable = 1'b1, in_valid = 1'b0;
    soft_t systematic = '0, parity1 = '0, parity2 = '0;
    logic in_ready, out_valid, decoder_out;
    logic [4:0] iteration;

    turbo_decoder #(.K1(K1), .K2(K2)) dut (.*);

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

    task automatic run_frame(input int amp, input bit clean, input string name);
      int t_load, t_out, errs, raw_errs, nout, its;
      for (int k = 0; k < K; k++) u[k] = 1'($urandom_range(1, 0));
      for (int s = 1; s <= K; s++) ub[s - 1] = u[ccsds_pi(s) - 1];
      rsc(u, par1);
      rsc(ub, par2);
      raw_errs = 0;
      wait (in_ready);
      @(negedge clk);
      for (int k = 0; k < K; k++) begin
        in_valid   = 1'b1;
        systematic = tx(u[k], amp);
        parity1    = tx(par1[k], amp);
        parity2    = tx(par2[k], amp);
        if ((systematic >= 0) != u[k]) raw_errs++;
        @(negedge clk);
      end
      in_valid = 1'b0;
      t_load = cyc;
      t_out  = 0;
      nout   = 0;
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
      $display("K=%0d %s: iterations=%0d bit_errors=%0d channel_errors=%0d cycles=%0d",
               K, name, its, errs, raw_errs, t_out - t_load);
      if (clean) begin
        check(errs == 0, $sformatf("K=%0d %s: decoded bits", K, name));
        check(its >= 2 && its < MAXI, $sformatf("K=%0d %s: early stop", K, name));
      end else begin
        check(errs * 10 <= raw_errs, $sformatf("K=%0d %s: decoder removes most errors", K, name));
      end
      check((t_out - t_load) >= its * 2 * PASS && (t_out - t_load) <= its * 2 * (PASS + 6) + 6,
            $sformatf("K=%0d %s: decoding cycle count", K, name));
    endtask

    initial begin
      @(negedge rst);
      run_frame(0, 1'b1, "noiseless");
      run_frame(3, 1'b1, "light noise");
      run_frame(8, 1'b0, "heavy noise");
      finished[g] = 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (finished[0] && finished[1] && finished[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
