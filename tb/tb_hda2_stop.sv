// tb_hda2_stop: directed test of the HDA2 stop rule: stop when all sign pairs
// agree from iteration 2 on, never at iteration 1, always at the limit.
//
// Interface and timing: clocked DUT; stop is sampled the cycle after eval.
// Reference values are computed here independently of the design;
// the stimulus, sizes and tolerances are this testbench's own choices.
module tb_hda2_stop;
  logic clk = 0, rst = 1, clear = 0, eval = 0, stop, agree;
  logic [1:0] cmp_en = 0, hd1 = 0, hd2 = 0;
  logic [4:0] iter = 0;
  int checks = 0, failures = 0;

  hda2_stop #(.IW(5), .MIN_ITER(2), .MAX_ITER(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One half-iteration with n comparisons; mism = index of a differing pair (-1: none).
  task automatic pass(input int it, input int n, input int mism, input bit exp_stop);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int k = 0; k < n; k++) begin
      cmp_en = 2'b11;
      hd1 = 2'($urandom_range(3, 0));
      hd2 = hd1;
      if (k == mism) hd2[1] = ~hd2[1];
      @(negedge clk);
    end
    cmp_en = 0;
    // Differences presented with cmp_en low must not count.
    hd1 = 2'b00; hd2 = 2'b11; @(negedge clk);
    iter = 5'(it); eval = 1; @(negedge clk); eval = 0;
    checks++;
    if (stop !== exp_stop || agree !== (mism < 0)) begin
      failures++;
      $display("FAIL iter=%0d mism=%0d stop=%0b agree=%0b", it, mism, stop, agree);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    pass(1, 50, -1, 0);   // agreement in iteration 1 does not stop
    pass(2, 50, 17, 0);   // one mismatch
    pass(2, 50, 0, 0);    // mismatch in the first pair
    pass(2, 50, 49, 0);   // mismatch in the last pair
    pass(2, 50, -1, 1);   // all agree
    pass(3, 50, -1, 1);
    pass(7, 50, 3, 0);
    pass(8, 50, 3, 1);    // iteration limit
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
