// sm_unit: 16-state radix-4 state-metric recursion unit, used for the
// forward (alpha), backward (beta) and dummy-backward recursions.
//
// Sixteen acs_r4 nodes each combine four stored metrics with four radix-4
// branch metrics; the trellis wiring comes from turbo_pkg. Forward (FWD=1):
// node s takes the four states that reach s in two trellis steps. Backward
// (FWD=0): node s2 takes the four states reachable from s2 in two steps. The
// nodes' overflow flags are ORed and fed back as the common normalization
// command, so all 16 new metrics drop by 256 together.
//
// Timing: "cur" is the metric the current step starts from, either the
// register or, while init_sel is high, the init vector. When en is high the
// register takes the result of the step at the clock edge; one radix-4 step
// (two trellis stages) per cycle. "held" is the register itself, "nxt" the
// step's result and "norm" whether this step normalizes. Reset clears the
// register.
//
// Design basis: the 16 OACS nodes with a shared OR-ed normalization
// follow the reference design; the state numbering and the start/enable
// interface are this design's choices.
module sm_unit
  import turbo_pkg::*;
#(
  parameter bit FWD = 1'b1
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   en,
  input  logic   init_sel,
  input  sm_t    init [NSTATE],
  input  delta_t dl   [16],
  output sm_t    cur  [NSTATE],
  output sm_t    nxt  [NSTATE],
  output sm_t    held [NSTATE],
  output logic   norm
);
  sm_t  regs [NSTATE];
  logic over [NSTATE];

  always_comb
    for (int s = 0; s < NSTATE; s++) cur[s] = init_sel ? init[s] : regs[s];
  assign held = regs;

  for (genvar s = 0; s < NSTATE; s++) begin : g_node
    sm_t    in_sm [4];
    delta_t in_dl [4];
    for (genvar n = 0; n < 4; n++) begin : g_path
      localparam logic [5:0] PRED  = r4_pred(s, n);
      localparam logic [3:0] SRC   = FWD ? PRED[5:2] : r4_next(4'(s), 2'(n));
      localparam logic [3:0] LABEL = FWD ? r4_label(PRED[5:2], PRED[1:0])
                                         : r4_label(4'(s), 2'(n));
      assign in_sm[n] = cur[SRC];
      assign in_dl[n] = dl[LABEL];
    end
    acs_r4 u_acs (.sm_in(in_sm), .dl(in_dl), .norm(norm), .sm_out(nxt[s]), .over(over[s]));
  end

  always_comb begin
    norm = 1'b0;
    for (int s = 0; s < NSTATE; s++) norm |= over[s];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < NSTATE; s++) regs[s] <= '0;
    end else if (en) begin
      regs <= nxt;
    end
  end
endmodule
