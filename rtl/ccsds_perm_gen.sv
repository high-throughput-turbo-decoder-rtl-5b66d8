// ccsds_perm_gen: CCSDS turbo-code interleaver address generator.
//
// Walks s = 1..K (K = K1*K2) once, one address per cycle, and emits the
// 0-based pair (s-1, pi(s)-1), where pi is the CCSDS permutation
//   m = (s-1) mod 2, i = floor((s-1)/(2*K2)), j = floor((s-1)/2) - i*K2,
//   t = (19i + 1) mod (K1/2), q = t mod 8 + 1, c = (p_q*j + 21m) mod K2,
//   pi(s) = 2(t + c*K1/2 + 1) - m,
// with p_1..p_8 = 31, 37, 43, 47, 53, 59, 61, 67. No multiplier or divider is
// needed: p_q*j mod K2 and t are kept as running values, updated by a
// conditional subtraction when j or i steps. The decoder stores the sequence
// once in a table and reads it to interleave and de-interleave.
//
// Interface: a start pulse begins a pass; valid is high for K cycles with
// idx/perm; done pulses on the cycle after the last pair. Requires K2 > 67
// and K2 > 21 (true for every CCSDS block length).
//
// Design basis: the permutation is the CCSDS standard's. Computing it
// incrementally, one address per cycle, is this design's choice.
module ccsds_perm_gen #(
  parameter int unsigned K1 = 8,
  parameter int unsigned K2 = 223,
  localparam int unsigned K  = K1 * K2,
  localparam int unsigned AW = $clog2(K)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          valid,
  output logic [AW-1:0] idx,
  output logic [AW-1:0] perm,
  output logic          done
);
  localparam int unsigned H    = K1 / 2;
  localparam int unsigned T_ST = 19 % H;      // step of t when i increments
  localparam int unsigned T0   = 1 % H;       // t for i = 0
  localparam int unsigned JW   = $clog2(K2 + 1);
  localparam int unsigned TW   = (H > 1) ? $clog2(H) : 1;

  typedef logic [7:0] prime_t;

  function automatic prime_t prime(input logic [2:0] qm1);
    unique case (qm1)
      3'd0: return 8'd31;
      3'd1: return 8'd37;
      3'd2: return 8'd43;
      3'd3: return 8'd47;
      3'd4: return 8'd53;
      3'd5: return 8'd59;
      3'd6: return 8'd61;
      default: return 8'd67;
    endcase
  endfunction

  logic          m;
  logic [JW-1:0] j;
  logic [TW-1:0] t;
  logic [JW-1:0] acc;      // (p_q * j) mod K2
  logic [JW-1:0] c;
  logic [JW:0]   acc_inc, c_sum;
  logic [TW:0]   t_inc;
  prime_t        p;

  assign p       = prime(3'(t % 8));
  assign c_sum   = {1'b0, acc} + (m ? (JW+1)'(21) : '0);
  assign c       = (c_sum >= (JW+1)'(K2)) ? JW'(c_sum - (JW+1)'(K2)) : JW'(c_sum);
  assign acc_inc = {1'b0, acc} + (JW+1)'(p);
  assign t_inc   = {1'b0, t} + (TW+1)'(T_ST);

  // pi(s) - 1 = 2t + c*K1 + 1 - m
  assign perm = AW'(2 * int'(t) + int'(c) * int'(K1) + 1 - int'(m));

  always_ff @(posedge clk) begin
    if (rst) begin
      valid <= 1'b0;
      done  <= 1'b0;
      idx   <= '0;
      m     <= 1'b0;
      j     <= '0;
      t     <= TW'(T0);
      acc   <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        valid <= 1'b1;
        idx   <= '0;
        m     <= 1'b0;
        j     <= '0;
        t     <= TW'(T0);
        acc   <= '0;
      end else if (valid) begin
        if (int'(idx) == K - 1) begin
          valid <= 1'b0;
          done  <= 1'b1;
        end
        idx <= idx + 1'b1;
        m   <= ~m;
        if (m) begin
          if (int'(j) == K2 - 1) begin
            j   <= '0;
            acc <= '0;
            t   <= (t_inc >= (TW+1)'(H)) ? TW'(t_inc - (TW+1)'(H)) : TW'(t_inc);
          end else begin
            j   <= j + 1'b1;
            acc <= (acc_inc >= (JW+1)'(K2)) ? JW'(acc_inc - (JW+1)'(K2)) : JW'(acc_inc);
          end
        end
      end
    end
  end
endmodule
