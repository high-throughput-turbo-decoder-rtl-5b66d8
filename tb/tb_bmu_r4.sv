// tb_bmu_r4: random test of the radix-4 branch metric unit. For every path
// label {a,b} the reference evaluates (xs*X + xp*P) at both stages, with
// X = 1.5*ys + La and P = 1.5*yp in exact arithmetic, and halves the sum; the
// unit must match within the rounding of its two halvings and 1.5 products,
// and must be exactly antisymmetric: delta{a^1,b^1} = -delta{a,b}.
//
// Interface and timing: inputs change after a falling edge; outputs are
// checked after the next rising edge (one register stage).
// Reference values are computed here independently of the design;
// the stimulus, sizes and tolerances are this testbench's own choices.
module tb_bmu_r4;
  import turbo_pkg::*;
  sym_t   s0, s1;
  delta_t dl [16];
  logic signed [XW-1:0] x0, x1;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  bmu_r4 dut (.*);

  initial begin
    #1000000;   // 100000 clock cycles
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int n = 0; n < 5000; n++) begin
      real xr [2], pr [2];
      logic [31:0] r0, r1;
      r0 = $urandom;
      r1 = $urandom;
      s0 = r0[$bits(sym_t)-1:0];
      s1 = r1[$bits(sym_t)-1:0];
      @(posedge clk);
      #1;
      begin
        int ys0, yp0, la0, ys1, yp1, la1;
        ys0 = int'(s0.ys); yp0 = int'(s0.yp); la0 = int'(s0.la);
        ys1 = int'(s1.ys); yp1 = int'(s1.yp); la1 = int'(s1.la);
        xr[0] = 1.5 * ys0 + la0;  pr[0] = 1.5 * yp0;
        xr[1] = 1.5 * ys1 + la1;  pr[1] = 1.5 * yp1;
      end
      for (int a = 0; a < 4; a++)
        for (int b = 0; b < 4; b++) begin
          // label bit 0 = systematic sign, bit 1 = systematic xor parity
          int xsa, xpa, xsb, xpb, got;
          real ex;
          xsa = a[0] ? 1 : -1;  xpa = (a[0] ^ a[1]) ? 1 : -1;
          xsb = b[0] ? 1 : -1;  xpb = (b[0] ^ b[1]) ? 1 : -1;
          ex = (xsa * xr[0] + xpa * pr[0] + xsb * xr[1] + xpb * pr[1]) / 2.0;
          got = int'(dl[a*4+b]);
          checks++;
          if (got - ex > 2.0 || ex - got > 2.0 ||
              dl[a*4+b] != -dl[(a^1)*4 + (b^1)]) begin
            failures++;
            if (failures < 10) $display("FAIL label %0d%0d got %0d exp %f", a, b, dl[a*4+b], ex);
          end
        end
      checks++;
      if (x0 != XW'(((3 * int'(s0.ys)) >>> 1) + int'(s0.la)) && x0 != XW'((3 * int'(s0.ys)) / 2 + int'(s0.la))) begin
        failures++;
        $display("FAIL x0=%0d", x0);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
