// siso_r4: sliding-window radix-4 log-MAP soft-in/soft-out decoder for one
// 16-state CCSDS component code.
//
// The frame of K trellis stages is processed as K/2 radix-4 steps, cut into
// windows of W stages (W/2 steps); the last window may be shorter. A pass
// runs in phases of W/2 cycles. In phase p:
//   window p    streams in from the frame memory, last step first, two
//               trellis stages per cycle. It is written to window buffer
//               p mod 4 and drives the dummy beta unit, which runs backward
//               from a uniform start only to learn the backward metric at
//               the border of windows p-1 and p;
//   alpha       runs forward over window p-1, read from its window buffer,
//               and stores the metric at the start of each step in the
//               one-window alpha RAM (the recursion starts in state 0);
//   beta        runs backward over window p-2, read from its window buffer
//               in the order it was written, starting from the dummy unit's
//               result of the previous phase (or from a uniform start for
//               the last window: no tail stages are decoded, so the frame's
//               end is unknown), and feeds the LLR unit together with the
//               stored alpha.
// Each of the four window buffers is written or read by one unit per phase,
// so they can be single-port memories. The branch metric units register their
// inputs, so the recursions and the LLR unit run one cycle behind the
// addresses (fetch and execute stages). A pass takes (ceil(K/W) + 2) * W/2 + 3
// cycles from start to done; the first LLRs appear two phases and two cycles
// after the start, in reverse order within each window.
//
// Memory access: the unit asks for the soft inputs of two trellis stages
// per cycle (req_k) and expects them back on sym in the same cycle, so the
// caller can apply the interleaver to the addresses. The two stages are the
// even and odd stage of one radix-4 step, so the lowest address bit is a
// constant 0 on req_k[0] and 1 on req_k[1]; the full index is kept for the
// caller's convenience.
//
// Outputs: one cycle after the beta unit's step, out_valid presents the two
// stages' trellis indices, LLRs and extrinsic values Le = LLR - (Lc*ys + La),
// multiplied by 0.75 when "scale" is high and saturated to 6 bits.
// start (one cycle) begins a pass; done pulses once all outputs are out.
//
// Design basis: the three concurrent recursion units, the alpha RAM, the
// four ping-pong window buffers, the window size of 32 and the dummy-beta
// start of each window follow the reference design, as does the alpha RAM
// size of one window (here 12-bit words, since the offset is kept). The
// uniform start at the frame end, the exact phase schedule, the buffer
// addressing and the alternating alpha RAM address order are this design's
// choices.
module siso_r4
  import turbo_pkg::*;
#(
  parameter int unsigned K  = 1784,
  parameter int unsigned W  = 32,
  localparam int unsigned AW = $clog2(K)
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic                scale,
  output logic                busy,
  output logic                done,
  output logic [AW-1:0]       req_k [2],
  input  sym_t                sym   [2],
  output logic                out_valid,
  output logic [AW-1:0]       out_k   [2],
  output logic signed [LW-1:0] out_llr [2],
  output ext_t                out_le  [2]
);
  localparam int unsigned NS    = K / 2;              // radix-4 steps
  localparam int unsigned WS    = W / 2;              // steps per window
  localparam int unsigned NWIN  = (NS + WS - 1) / WS; // windows
  localparam int unsigned LAST  = NS - (NWIN - 1) * WS;
  localparam int unsigned PW    = $clog2(NWIN + 2);
  localparam int unsigned CWID  = (WS > 1) ? $clog2(WS) : 1;
  localparam int unsigned SMBITS = NSTATE * $bits(sm_t);

  typedef logic signed [XW-1:0] xw_t;
  typedef logic signed [LW-1:0] lw_t;

  // ---------------------------------------------------------------- control
  logic            run;
  logic [PW-1:0]   p;      // phase
  logic [CWID-1:0] c;      // cycle within the phase
  logic            fin, fin2;   // fetch finished; waiting for the last output

  function automatic int unsigned win_len(input int unsigned q);
    return (q == NWIN - 1) ? LAST : WS;
  endfunction

  // Two stages: fetch (p, c) issues addresses, writes the streaming window
  // and reads the window buffers into the branch metric units' registers;
  // one cycle later execute (p1, c1) runs the recursions, the alpha RAM and
  // the LLR unit on those values.
  logic            run1;
  logic [PW-1:0]   p1;
  logic [CWID-1:0] c1;

  logic s_act, a_act, d_act, b_act;
  int unsigned pn, cn, js, la;            // fetch stage
  int unsigned pe, ce, jb, lae, lbe;      // execute stage

  // Phase p: window p streams in (dummy beta), alpha runs on window p-1,
  // beta on window p-2.
  always_comb begin
    pn    = int'(p);
    cn    = int'(c);
    la    = win_len(pn - 1);
    s_act = run && (pn < NWIN) && (cn < win_len(pn));
    js    = pn * WS + win_len(pn) - 1 - cn;
    pe    = int'(p1);
    ce    = int'(c1);
    lae   = win_len(pe - 1);
    lbe   = win_len(pe - 2);
    d_act = run1 && (pe < NWIN)                 && (ce < win_len(pe));
    a_act = run1 && (pe >= 1) && (pe - 1 < NWIN) && (ce < lae);
    b_act = run1 && (pe >= 2)                   && (ce < lbe);
    jb    = (pe - 2) * WS + lbe - 1 - ce;
  end

  always_comb begin
    req_k[0] = AW'(2 * js);
    req_k[1] = AW'(2 * js + 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      run  <= 1'b0;
      fin  <= 1'b0;
      fin2 <= 1'b0;
      done <= 1'b0;
      run1 <= 1'b0;
      p    <= '0;
      c    <= '0;
      p1   <= '0;
      c1   <= '0;
    end else begin
      run1 <= run;
      p1   <= p;
      c1   <= c;
      done <= 1'b0;
      fin  <= 1'b0;
      fin2 <= fin;
      if (start && !run) begin
        run <= 1'b1;
        p   <= '0;
        c   <= '0;
      end else if (run) begin
        if (int'(c) == WS - 1) begin
          c <= '0;
          if (int'(p) == NWIN + 1) begin
            run <= 1'b0;
            fin <= 1'b1;
          end else begin
            p <= p + 1'b1;
          end
        end else begin
          c <= c + 1'b1;
        end
      end
      if (fin2) done <= 1'b1;
    end
  end

  assign busy = run | fin | fin2;

  // ------------------------------------------------------ branch metrics
  delta_t dl_a [16], dl_d [16], dl_b [16];
  xw_t    xa0, xa1, xd0, xd1, xb0, xb1;

  // ------------------------------------------------- input window buffers
  // Four banks of W/2 words; a word holds the two stages of one radix-4
  // step. Window q is written to bank q mod 4 in the order it streams in
  // (last step first); alpha reads it one phase later from the far end,
  // beta two phases later in the order it was written. In any phase a bank
  // is either written or read by one unit, never both.
  localparam int unsigned WBW = 2 * $bits(sym_t);
  logic [WBW-1:0] wb_word, wa_word, wbeta_word;
  logic [WBW-1:0] wb_rdata [4];
  logic [1:0]     bank_s, bank_a, bank_b;

  assign wb_word = {sym[1], sym[0]};
  assign bank_s  = p[1:0];
  assign bank_a  = 2'(pn - 1);
  assign bank_b  = 2'(pn - 2);

  for (genvar g = 0; g < 4; g++) begin : g_wbuf
    logic           we    [1];
    logic [CWID-1:0] waddr [1], raddr [1];
    logic [WBW-1:0] wdata [1], rdata [1];
    always_comb begin
      we[0]    = s_act && (bank_s == 2'(g));
      waddr[0] = c;
      wdata[0] = wb_word;
      raddr[0] = (bank_a == 2'(g)) ? CWID'(la - 1 - cn) : c;
    end
    assign wb_rdata[g] = rdata[0];
    mport_ram #(.WIDTH(WBW), .DEPTH(WS), .NR(1), .NW(1)) u_bank (
      .clk, .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata));
  end

  assign wa_word    = wb_rdata[bank_a];
  assign wbeta_word = wb_rdata[bank_b];

  bmu_r4 u_bmu_a (.clk, .s0(wa_word[$bits(sym_t)-1:0]), .s1(wa_word[WBW-1:$bits(sym_t)]),
                  .dl(dl_a), .x0(xa0), .x1(xa1));
  bmu_r4 u_bmu_d (.clk, .s0(sym[0]), .s1(sym[1]), .dl(dl_d), .x0(xd0), .x1(xd1));
  bmu_r4 u_bmu_b (.clk, .s0(wbeta_word[$bits(sym_t)-1:0]), .s1(wbeta_word[WBW-1:$bits(sym_t)]),
                  .dl(dl_b), .x0(xb0), .x1(xb1));

  // ---------------------------------------------------- recursion units
  sm_t init_known [NSTATE], init_unif [NSTATE], init_beta [NSTATE];
  sm_t a_cur [NSTATE], d_held [NSTATE], b_cur [NSTATE];
  sm_t unused_a_nxt [NSTATE], unused_a_held [NSTATE], unused_d_cur [NSTATE];
  sm_t unused_d_nxt [NSTATE], unused_b_nxt [NSTATE], unused_b_held [NSTATE];
  logic a_norm, d_norm, b_norm;

  always_comb
    for (int s = 0; s < NSTATE; s++) begin
      init_known[s] = '{a: (s == 0) ? SMW'(SM_INIT) : '0, b: '0};
      init_unif[s]  = '{a: SMW'(SM_INIT), b: '0};
      init_beta[s]  = (pe - 2 == NWIN - 1) ? init_unif[s] : d_held[s];
    end

  sm_unit #(.FWD(1'b1)) u_alpha (
    .clk, .rst, .en(a_act), .init_sel(pe == 1 && c1 == 0), .init(init_known),
    .dl(dl_a), .cur(a_cur), .nxt(unused_a_nxt), .held(unused_a_held), .norm(a_norm));

  sm_unit #(.FWD(1'b0)) u_dummy (
    .clk, .rst, .en(d_act), .init_sel(c1 == 0), .init(init_unif),
    .dl(dl_d), .cur(unused_d_cur), .nxt(unused_d_nxt), .held(d_held), .norm(d_norm));

  sm_unit #(.FWD(1'b0)) u_beta (
    .clk, .rst, .en(b_act), .init_sel(c1 == 0), .init(init_beta),
    .dl(dl_b), .cur(b_cur), .nxt(unused_b_nxt), .held(unused_b_held), .norm(b_norm));

  // ------------------------------------------------------------ alpha RAM
  // One window of W/2 words, one word = the 16 alpha metrics of one step.
  // Window q keeps step i at address i (q even) or W/2-1-i (q odd). In each
  // cycle the beta unit reads the word of window q that alpha overwrites
  // with window q+1 in the same cycle, so one window's space suffices; the
  // read sees the old word.
  logic                     ar_we    [1];
  logic [CWID-1:0]          ar_waddr [1];
  logic [SMBITS-1:0]        ar_wdata [1];
  logic [CWID-1:0]          ar_raddr [1];
  int unsigned              ar_ri;          // step of window p-2 read now
  logic [SMBITS-1:0]        ar_rdata [1];
  sm_t                      a_mem [NSTATE];

  always_comb begin
    ar_we[0]    = a_act;
    ar_ri       = lbe - 1 - ce;
    ar_waddr[0] = p1[0] ? c1 : CWID'(WS - 1 - ce);             // window p-1
    ar_raddr[0] = p1[0] ? CWID'(WS - 1 - ar_ri) : CWID'(ar_ri); // window p-2
    for (int s = 0; s < NSTATE; s++) begin
      ar_wdata[0][s*$bits(sm_t) +: $bits(sm_t)] = a_cur[s];
      a_mem[s] = ar_rdata[0][s*$bits(sm_t) +: $bits(sm_t)];
    end
  end

  mport_ram #(.WIDTH(SMBITS), .DEPTH(WS), .NR(1), .NW(1)) u_alpha_ram (
    .clk, .we(ar_we), .waddr(ar_waddr), .wdata(ar_wdata), .raddr(ar_raddr), .rdata(ar_rdata));

  // ------------------------------------------------------------------ LLR
  lw_t llr0, llr1;
  lcu_r4 u_lcu (.clk, .alpha(a_mem), .beta(b_cur), .dl(dl_b), .llr0(llr0), .llr1(llr1));

  logic          v_q;
  logic [AW-1:0] k_q [2];
  xw_t           x_q [2];
  logic          scale_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      v_q <= 1'b0;
    end else begin
      v_q <= b_act;
    end
    k_q[0]  <= AW'(2 * jb);
    k_q[1]  <= AW'(2 * jb + 1);
    x_q[0]  <= xb0;
    x_q[1]  <= xb1;
    scale_q <= scale;
  end

  function automatic ext_t ext_of(input lw_t llr, input xw_t x, input logic sc);
    lw_t e, es;
    e  = llr - lw_t'(x);
    es = sc ? (e - (e >>> 2)) : e;
    if (es > lw_t'(2**(LEW-1) - 1)) return ext_t'(2**(LEW-1) - 1);
    if (es < -lw_t'(2**(LEW-1)))    return ext_t'(-(2**(LEW-1)));
    return ext_t'(es);
  endfunction

  assign out_valid  = v_q;
  assign out_k      = k_q;
  assign out_llr[0] = llr0;
  assign out_llr[1] = llr1;
  assign out_le[0]  = ext_of(llr0, x_q[0], scale_q);
  assign out_le[1]  = ext_of(llr1, x_q[1], scale_q);

  // Outputs of the recursion and branch units that this unit does not need
  // (the normalization flags are watched by the testbenches).
  logic unused_sig;
  assign unused_sig = ^{xa0, xa1, xd0, xd1, a_norm, d_norm, b_norm};
endmodule
