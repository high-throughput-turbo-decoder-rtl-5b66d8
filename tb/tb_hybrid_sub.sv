// tb_hybrid_sub: random and corner-case test of d = a0 + b0 - a1 - b1
// (modulo 2^12) against plain integer arithmetic.
//
// Interface and timing: combinational DUT.
// Reference values are computed here independently of the design;
// the stimulus, sizes and tolerances are this testbench's own choices.
module tb_hybrid_sub;
  logic signed [11:0] a0, b0, a1, b1, d;
  int checks = 0, failures = 0;

  hybrid_sub #(.W(12)) dut (.a0(a0), .b0(b0), .a1(a1), .b1(b1), .d(d));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int x0, input int y0, input int x1, input int y1);
    logic signed [11:0] e;
    a0 = 12'(x0); b0 = 12'(y0); a1 = 12'(x1); b1 = 12'(y1);
    #1;
    e = 12'(x0 + y0 - x1 - y1);
    checks++;
    if (d !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %0d+%0d-%0d-%0d: got %0d exp %0d", x0, y0, x1, y1, d, e);
    end
  endtask

  initial begin
    one(0, 0, 0, 0);
    one(1, 0, 0, 0);
    one(0, 0, 1, 0);
    one(0, 0, 0, 1);
    one(2047, 2047, -2048, -2048);
    one(-2048, -2048, 2047, 2047);
    for (int n = 0; n < 20000; n++)
      one($urandom_range(4095, 0), $urandom_range(4095, 0), $urandom_range(4095, 0),
          $urandom_range(4095, 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
