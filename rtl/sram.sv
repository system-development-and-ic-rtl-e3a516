// sram: one line memory (one of the two 1H delay memories).
//
// A single-port synchronous RAM that, in every clock, reads the word at `addr`
// and writes `wdata` to the same address when `we` is high.  The read returns
// the old contents (read-before-write) on `rdata` one clock later.  Addressed by
// a counter that restarts at every line, the RAM therefore returns the sample
// written exactly one line period earlier: a 1H delay.  On silicon this would be
// a compiled memory macro; here it is a plain array.  DEPTH defaults to 858
// words, one line of 525-line video sampled at 13.5 MHz (about 63.5 us).
module sram #(
  parameter int unsigned DEPTH  = 858,
  parameter int unsigned WIDTH  = 9,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              we,
  input  logic [WIDTH-1:0]  wdata,
  output logic [WIDTH-1:0]  rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    rdata <= mem[addr];
    if (we) mem[addr] <= wdata;
  end

endmodule
