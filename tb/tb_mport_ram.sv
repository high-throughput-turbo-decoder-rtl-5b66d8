// tb_mport_ram: random reads and writes on a 2-write, 3-read memory compared
// with a behavioural array: read-before-write in one cycle, higher write port
// wins on a collision.
//
// Interface and timing: writes at the clock edge, reads compared combinationally before it.
// Reference values are computed here independently of the design;
// the stimulus, sizes and tolerances are this testbench's own choices.
module tb_mport_ram;
  localparam int WIDTH = 8, DEPTH = 40, NR = 3, NW = 2, AW = $clog2(DEPTH);
  logic clk = 0;
  logic we [NW];
  logic [AW-1:0] waddr [NW];
  logic [WIDTH-1:0] wdata [NW];
  logic [AW-1:0] raddr [NR];
  logic [WIDTH-1:0] rdata [NR];
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  mport_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH), .NR(NR), .NW(NW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Fill every word first.
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we[0] = 1; waddr[0] = AW'(a); wdata[0] = WIDTH'(a * 7);
      we[1] = 0; waddr[1] = '0; wdata[1] = '0;
      model[a] = WIDTH'(a * 7);
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NR; p++) raddr[p] = AW'($urandom_range(DEPTH - 1, 0));
      for (int p = 0; p < NW; p++) begin
        we[p] = 1'($urandom_range(1, 0));
        waddr[p] = AW'($urandom_range(DEPTH - 1, 0));
        if (n % 7 == 0) waddr[p] = raddr[0];
        wdata[p] = WIDTH'($urandom);
      end
      #1;
      for (int p = 0; p < NR; p++) begin
        checks++;
        if (rdata[p] !== model[raddr[p]]) begin
          failures++;
          if (failures < 10) $display("FAIL read %0d: got %0h exp %0h", raddr[p], rdata[p], model[raddr[p]]);
        end
      end
      for (int p = 0; p < NW; p++) if (we[p]) model[waddr[p]] = wdata[p];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
