// tb_glut: exhaustive test of the GLUT correction term over every 12-bit
// signed difference. The expected value comes from ln(1+exp(-|x|)) rounded to
// the design's table: 0.75 at 0, 0.5 up to 0.75, 0.25 up to 1.75, 0 from 2.0.
//
// Interface and timing: combinational DUT, every input value applied once.
// Reference values are computed here independently of the design;
// the stimulus, sizes and tolerances are this testbench's own choices.
module tb_glut;
  logic signed [11:0] x;
  logic [1:0] c;
  int checks = 0, failures = 0;

  glut #(.W(12)) dut (.x(x), .c(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_corr(input int v);
    int m;
    real f;
    m = (v < 0) ? -v : v;                 // |x| in units of 0.25
    if (m >= 8) return 0;
    f = $ln(1.0 + $exp(-m / 4.0));        // exact correction
    if (m == 0) return 3;                  // 0.69 -> 0.75
    if (f > 0.375) return 2;               // 0.25 .. 0.75 -> 0.5
    return 1;                              // 1.0 .. 1.75 -> 0.25
  endfunction

  initial begin
    for (int v = -2048; v < 2048; v++) begin
      x = 12'(v);
      #1;
      checks++;
      if (int'(c) != ref_corr(v)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d c=%0d exp=%0d", v, c, ref_corr(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
