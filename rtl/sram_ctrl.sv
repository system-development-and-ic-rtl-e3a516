// sram_ctrl: address generator for the two line memories.
//
// A counter restarts at 0 on `line_start` (the first clock of every line
// period, blanking included) and advances by one each clock, saturating at
// DEPTH-1, so the same position in successive lines uses the same address.
// The first memory uses this address directly; the second one is written with
// the first memory's registered output, so it uses the address delayed by one
// clock.  Both memories are written every clock, so `we` is a constant 1; it
// is kept as a port so the memories see an ordinary write-enable interface.  `ok1` / `ok2` tell whether the
// first / second memory has been filled by at least one / two complete lines
// since reset, so stale memory contents can be ignored.  The document only
// names this block; its insides are this design's own.
module sram_ctrl #(
  parameter int unsigned DEPTH  = 858,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              line_start,
  output logic [ADDR_W-1:0] addr1,
  output logic [ADDR_W-1:0] addr2,
  output logic              we,
  output logic              ok1,
  output logic              ok2
);

  logic [ADDR_W-1:0] cnt;
  logic [1:0]        lines;   // line starts seen since reset, saturating at 3
  logic [1:0]        lines_now;

  always_comb begin
    addr1     = line_start ? '0 : cnt;
    lines_now = (line_start && lines != 2'd3) ? lines + 2'd1 : lines;
    ok1       = lines_now >= 2'd2;
    ok2       = lines_now == 2'd3;
    we        = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      addr2 <= '0;
      lines <= '0;
    end else begin
      cnt   <= (addr1 == ADDR_W'(DEPTH - 1)) ? addr1 : addr1 + 1'b1;
      addr2 <= addr1;
      lines <= lines_now;
    end
  end

endmodule
