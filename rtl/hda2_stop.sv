// hda2_stop: HDA2 early-stopping decision.
//
// During the second half-iteration the decoder compares, bit by bit, the
// hard decision (LLR sign) of the second component decoder with the one the
// first component decoder made for the same information bit in the same
// iteration. This unit accumulates whether any pair differed. At the end of
// the iteration it asks for a stop when every pair agreed and at least
// MIN_ITER iterations are done, or unconditionally when MAX_ITER iterations
// are done.
//
// Interface: clear (one cycle) before the half-iteration; cmp_en[n] with
// hd1[n]/hd2[n] presents up to two comparisons per cycle (one radix-4 step);
// at the iteration's end, eval pulses with iter = iterations completed
// (1-based); stop and agree are registered and valid the cycle after eval.
//
// Design basis: the HDA2 rule and its start after two iterations follow the
// reference design; the limit of 8 iterations and the mismatch-flag realization
// are this design's choices.
module hda2_stop #(
  parameter int unsigned IW       = 5,
  parameter int unsigned MIN_ITER = 2,
  parameter int unsigned MAX_ITER = 8
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          clear,
  input  logic [1:0]    cmp_en,
  input  logic [1:0]    hd1,
  input  logic [1:0]    hd2,
  input  logic          eval,
  input  logic [IW-1:0] iter,
  output logic          stop,
  output logic          agree
);
  logic mismatch;

  always_ff @(posedge clk) begin
    if (rst) begin
      mismatch <= 1'b0;
      stop     <= 1'b0;
      agree    <= 1'b0;
    end else begin
      if (clear) mismatch <= 1'b0;
      else if (|(cmp_en & (hd1 ^ hd2))) mismatch <= 1'b1;
      if (eval) begin
        agree <= ~mismatch;
        stop  <= (~mismatch && (int'(iter) >= MIN_ITER)) || (int'(iter) >= MAX_ITER);
      end
    end
  end
endmodule
