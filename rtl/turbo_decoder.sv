// turbo_decoder: CCSDS rate-1/3 turbo decoder core with one radix-4
// sliding-window log-MAP SISO decoder and HDA2 early stopping.
//
// Flow: after reset the interleaver table is built (K cycles). A frame of K
// soft symbol triples (systematic, parity 1, parity 2; 5-bit two's
// complement, 2 fraction bits) enters while in_valid is high, one per cycle,
// and is stored in the input buffer; the extrinsic memory is cleared at the
// same time. Each iteration runs the SISO twice: first on the natural-order
// trellis (systematic, parity 1, a-priori read in natural order), then on the
// interleaved trellis (systematic and a-priori read at pi(k), parity 2 at k).
// Extrinsic values are written back in natural order to the single extrinsic
// memory, so the second pass de-interleaves its output by writing to pi(k).
// The extrinsic output is scaled by 0.75 during the first three iterations.
// From the second iteration on, the HDA2 rule stops decoding when the signs
// of both passes' LLRs agree for every bit; otherwise decoding stops after
// MAX_ITER iterations. The hard decisions of the last second pass (LLR >= 0
// gives bit 1) then leave in natural order, one per cycle with out_valid.
//
// Ports follow the core's pin list: clk, rst (synchronous, active high),
// enable (a frame is decoded only while it is high when loading ends),
// in_valid, systematic, parity1, parity2, iteration (iterations performed
// for the current/last frame), out_valid, decoder_out. in_ready (high while a
// new frame may be sent) is this design's addition.
//
// Design basis: the flow (buffer, two SISO passes per iteration, HDA2 early
// stop, iteration limit, hard decision), the pin names, the 0.75 scaling of the
// first three iterations and K = 1784 follow the reference design. The single
// natural-order extrinsic memory, the stored interleaver table, the limit of 8
// iterations, the meaning of enable, in_ready, and decoding without tail
// stages are this design's choices.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned K1       = 8,
  parameter int unsigned K2       = 223,
  parameter int unsigned W        = 32,
  parameter int unsigned MAX_ITER = 8,
  parameter int unsigned IW       = 5,
  localparam int unsigned K  = K1 * K2,
  localparam int unsigned AW = $clog2(K)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          enable,
  input  logic          in_valid,
  input  soft_t         systematic,
  input  soft_t         parity1,
  input  soft_t         parity2,
  output logic          in_ready,
  output logic [IW-1:0] iteration,
  output logic          out_valid,
  output logic          decoder_out
);
  typedef enum logic [3:0] {
    S_PERM, S_IDLE, S_LOAD, S_RUN1, S_WAIT1, S_RUN2, S_WAIT2, S_EVAL, S_CHECK, S_OUT
  } state_t;

  state_t        st;
  logic [AW-1:0] cnt;
  logic          second;     // SISO pass on the interleaved trellis

  // ------------------------------------------------------ interleaver table
  logic          pg_start, pg_valid, pg_done;
  logic [AW-1:0] pg_idx, pg_perm;

  ccsds_perm_gen #(.K1(K1), .K2(K2)) u_perm_gen (
    .clk, .rst, .start(pg_start), .valid(pg_valid), .idx(pg_idx), .perm(pg_perm), .done(pg_done));

  // Read ports 0..1: SISO requests, 2..3: SISO outputs (write-back addresses).
  logic          pt_we    [1];
  logic [AW-1:0] pt_waddr [1];
  logic [AW-1:0] pt_wdata [1];
  logic [AW-1:0] pt_raddr [4];
  logic [AW-1:0] pt_rdata [4];

  assign pt_we[0]    = pg_valid;
  assign pt_waddr[0] = pg_idx;
  assign pt_wdata[0] = pg_perm;

  mport_ram #(.WIDTH(AW), .DEPTH(K), .NR(4), .NW(1)) u_perm_tab (
    .clk, .we(pt_we), .waddr(pt_waddr), .wdata(pt_wdata), .raddr(pt_raddr), .rdata(pt_rdata));

  // ----------------------------------------------------------------- SISO
  logic                 siso_start, siso_scale, siso_busy, siso_done, siso_ov;
  logic [AW-1:0]        req_k [2];
  sym_t                 sym   [2];
  logic [AW-1:0]        o_k   [2];
  logic signed [LW-1:0] o_llr [2];
  ext_t                 o_le  [2];

  siso_r4 #(.K(K), .W(W)) u_siso (
    .clk, .rst, .start(siso_start), .scale(siso_scale), .busy(siso_busy), .done(siso_done),
    .req_k(req_k), .sym(sym), .out_valid(siso_ov), .out_k(o_k), .out_llr(o_llr), .out_le(o_le));

  // Natural-order address of each requested / produced trellis stage.
  logic [AW-1:0] nat_req [2];
  logic [AW-1:0] nat_out [2];
  always_comb begin
    for (int n = 0; n < 2; n++) begin
      pt_raddr[n] = req_k[n];
      nat_req[n]  = second ? pt_rdata[n] : req_k[n];
    end
    for (int n = 0; n < 2; n++) begin
      pt_raddr[2 + n] = o_k[n];
      nat_out[n]      = second ? pt_rdata[2 + n] : o_k[n];
    end
  end

  // ---------------------------------------------------------- input buffer
  // Systematic values and both parities, stored by natural index.
  logic          ib_we    [1];
  logic [AW-1:0] ib_waddr [1];
  logic [YW-1:0] ys_wdata [1];
  logic [2*YW-1:0] pp_wdata [1];
  logic [AW-1:0] ys_raddr [2], pp_raddr [2];
  logic [YW-1:0] ys_rdata [2];
  logic [2*YW-1:0] pp_rdata [2];

  assign ib_we[0]    = (st == S_IDLE || st == S_LOAD) && in_valid;
  assign ib_waddr[0] = cnt;
  assign ys_wdata[0] = systematic;
  assign pp_wdata[0] = {parity1, parity2};

  mport_ram #(.WIDTH(YW), .DEPTH(K), .NR(2), .NW(1)) u_in_buf_sys (
    .clk, .we(ib_we), .waddr(ib_waddr), .wdata(ys_wdata), .raddr(ys_raddr), .rdata(ys_rdata));
  mport_ram #(.WIDTH(2*YW), .DEPTH(K), .NR(2), .NW(1)) u_in_buf_par (
    .clk, .we(ib_we), .waddr(ib_waddr), .wdata(pp_wdata), .raddr(pp_raddr), .rdata(pp_rdata));

  // ------------------------------------------------------ extrinsic memory
  logic          le_we    [2];
  logic [AW-1:0] le_waddr [2];
  logic [LEW-1:0] le_wdata [2];
  logic [AW-1:0] le_raddr [2];
  logic [LEW-1:0] le_rdata [2];

  always_comb begin
    for (int n = 0; n < 2; n++) begin
      ys_raddr[n] = nat_req[n];
      pp_raddr[n] = req_k[n];
      le_raddr[n] = nat_req[n];
      sym[n].ys   = soft_t'(ys_rdata[n]);
      sym[n].yp   = second ? soft_t'(pp_rdata[n][YW-1:0]) : soft_t'(pp_rdata[n][2*YW-1:YW]);
      sym[n].la   = ext_t'(le_rdata[n]);
    end
    // Port 0 clears the memory while a frame loads; both ports write back
    // the SISO's extrinsic output.
    if (st == S_IDLE || st == S_LOAD) begin
      le_we[0] = in_valid;  le_waddr[0] = cnt;  le_wdata[0] = '0;
      le_we[1] = 1'b0;      le_waddr[1] = '0;   le_wdata[1] = '0;
    end else begin
      for (int n = 0; n < 2; n++) begin
        le_we[n]    = siso_ov;
        le_waddr[n] = nat_out[n];
        le_wdata[n] = o_le[n];
      end
    end
  end

  mport_ram #(.WIDTH(LEW), .DEPTH(K), .NR(2), .NW(2)) u_lex_mem (
    .clk, .we(le_we), .waddr(le_waddr), .wdata(le_wdata), .raddr(le_raddr), .rdata(le_rdata));

  // --------------------------------------------------- hard decision memories
  // hd1: first-pass decisions (natural order), read back by the second pass
  // for the HDA2 comparison. hdo: second-pass decisions, the decoder output.
  logic          hd_we1 [2], hd_we2 [2];
  logic [AW-1:0] hd_waddr [2];
  logic [0:0]    hd_wdata [2];
  logic [AW-1:0] hd1_raddr [2], hdo_raddr [1];
  logic [0:0]    hd1_rdata [2], hdo_rdata [1];
  logic [1:0]    hd_new;

  always_comb
    for (int n = 0; n < 2; n++) begin
      hd_new[n]    = ~o_llr[n][LW-1];
      hd_we1[n]    = siso_ov && !second;
      hd_we2[n]    = siso_ov && second;
      hd_waddr[n]  = nat_out[n];
      hd_wdata[n]  = hd_new[n];
      hd1_raddr[n] = nat_out[n];
    end
  assign hdo_raddr[0] = cnt;

  mport_ram #(.WIDTH(1), .DEPTH(K), .NR(2), .NW(2)) u_hd1_mem (
    .clk, .we(hd_we1), .waddr(hd_waddr), .wdata(hd_wdata), .raddr(hd1_raddr), .rdata(hd1_rdata));
  mport_ram #(.WIDTH(1), .DEPTH(K), .NR(1), .NW(2)) u_hdo_mem (
    .clk, .we(hd_we2), .waddr(hd_waddr), .wdata(hd_wdata), .raddr(hdo_raddr), .rdata(hdo_rdata));

  // ------------------------------------------------------------ HDA2 stop
  logic hs_clear, hs_eval, hs_stop, hs_agree;
  logic [1:0] hs_en, hs_hd1;

  assign hs_en  = {2{siso_ov && second}};
  assign hs_hd1 = {hd1_rdata[1][0], hd1_rdata[0][0]};

  hda2_stop #(.IW(IW), .MIN_ITER(2), .MAX_ITER(MAX_ITER)) u_hda2 (
    .clk, .rst, .clear(hs_clear), .cmp_en(hs_en), .hd1(hs_hd1), .hd2(hd_new),
    .eval(hs_eval), .iter(iteration), .stop(hs_stop), .agree(hs_agree));

  // ------------------------------------------------------------ controller
  assign in_ready   = (st == S_IDLE) || (st == S_LOAD);
  assign pg_start   = (st == S_PERM) && (cnt == '0) && !pg_valid;
  assign siso_start = (st == S_RUN1) || (st == S_RUN2);
  assign siso_scale = int'(iteration) <= 3;
  assign hs_clear   = (st == S_RUN2);
  assign hs_eval    = (st == S_EVAL);

  always_ff @(posedge clk) begin
    if (rst) begin
      st          <= S_PERM;
      cnt         <= '0;
      second      <= 1'b0;
      iteration   <= '0;
      out_valid   <= 1'b0;
      decoder_out <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (st)
        S_PERM: begin
          if (pg_start) cnt <= AW'(1);   // marks the generator as started
          if (pg_done) begin
            st  <= S_IDLE;
            cnt <= '0;
          end
        end
        S_IDLE, S_LOAD: begin
          if (in_valid) begin
            st <= S_LOAD;
            if (int'(cnt) == K - 1) begin
              cnt <= '0;
              if (enable) begin
                st        <= S_RUN1;
                iteration <= IW'(1);
              end else begin
                st <= S_IDLE;
              end
            end else begin
              cnt <= cnt + 1'b1;
            end
          end
        end
        S_RUN1: begin
          second <= 1'b0;
          st     <= S_WAIT1;
        end
        S_WAIT1: if (siso_done) begin
          second <= 1'b1;
          st     <= S_RUN2;
        end
        S_RUN2: st <= S_WAIT2;
        S_WAIT2: if (siso_done) st <= S_EVAL;
        S_EVAL:  st <= S_CHECK;
        S_CHECK: begin
          second <= 1'b0;
          if (hs_stop) begin
            st  <= S_OUT;
            cnt <= '0;
          end else begin
            iteration <= iteration + 1'b1;
            st        <= S_RUN1;
          end
        end
        S_OUT: begin
          out_valid   <= 1'b1;
          decoder_out <= hdo_rdata[0][0];
          if (int'(cnt) == K - 1) begin
            cnt <= '0;
            st  <= S_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  // A SISO pass is only started when the previous one has finished.
  always_ff @(posedge clk)
    if (!rst) assert (!(siso_start && siso_busy))
      else $error("turbo_decoder: SISO started while busy");

  logic unused_ok;
  assign unused_ok = hs_agree;
endmodule
