// mport_ram: multi-port memory written as an array; used for the frame input
// buffer, the alpha (forward metric) RAM banks, the extrinsic memory, the
// interleaver table and the hard-decision memories.
//
// NW synchronous write ports and NR asynchronous read ports. A read of an
// address written in the same cycle returns the old word. If two write ports
// address the same word in one cycle, the higher-numbered port wins.
// The contents are not reset; every user writes a word before reading it.
//
// Design basis: the reference design uses single-port SRAM macros; this
// array with several asynchronous read ports is this design's substitute.
module mport_ram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 1784,
  parameter int unsigned NR    = 1,
  parameter int unsigned NW    = 1,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we    [NW],
  input  logic [AW-1:0]    waddr [NW],
  input  logic [WIDTH-1:0] wdata [NW],
  input  logic [AW-1:0]    raddr [NR],
  output logic [WIDTH-1:0] rdata [NR]
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    for (int p = 0; p < NW; p++)
      if (we[p] && (int'(waddr[p]) < DEPTH)) mem[waddr[p]] <= wdata[p];

  always_comb
    for (int p = 0; p < NR; p++)
      rdata[p] = (int'(raddr[p]) < DEPTH) ? mem[raddr[p]] : '0;
endmodule
