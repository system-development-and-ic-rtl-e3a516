// line_memory: the two cascaded 1H delays feeding the vertical filter.
//
// The incoming sample goes into the first memory (Sram1); the first memory's
// output, one line old, goes into the second memory (Sram2), whose output is
// two lines old.  Each stored word is the 8-bit pixel plus its active-picture
// flag, so the delayed lines carry their own timing.  Latency: `d1` is valid
// one clock after the sample at `din` that shares its line position, `d2` two
// clocks after; the vdelay block lines the three up.  The structure (two 1H
// memories in cascade) follows the document; the address scheme is this
// design's own (see sram_ctrl).
module line_memory
  import scaler_pkg::*;
#(
  parameter int unsigned DEPTH = 858
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    line_start,
  input  sample_t din,
  output sample_t d1,
  output sample_t d2,
  output logic    ok1,
  output logic    ok2
);

  localparam int unsigned ADDR_W = $clog2(DEPTH);

  logic [ADDR_W-1:0] addr1, addr2;
  logic              we;

  sram_ctrl #(.DEPTH(DEPTH)) u_ctrl (
    .clk, .rst_n, .line_start, .addr1, .addr2, .we, .ok1, .ok2
  );

  sram #(.DEPTH(DEPTH), .WIDTH($bits(sample_t))) u_sram1 (
    .clk, .addr(addr1), .we, .wdata(din), .rdata(d1)
  );

  sram #(.DEPTH(DEPTH), .WIDTH($bits(sample_t))) u_sram2 (
    .clk, .addr(addr2), .we, .wdata(d1), .rdata(d2)
  );

endmodule
