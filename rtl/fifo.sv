// fifo: output FIFO holding the valid downscaled pixels.
//
// Single-clock FIFO of DEPTH words of WIDTH bits (DEPTH a power of two),
// built on an array with separate read and write pointers that carry one
// extra wrap bit.  A write with `wr_en` stores `din`; a read with `rd_en`
// while not empty presents the oldest word on `dout` one clock later with
// `dout_valid`.  A write into a full FIFO or a read from an empty one is
// ignored.  `count` is the number of stored words.  On silicon the storage
// would be a compiled memory macro.  The depth is this design's choice.
module fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned PTR_W = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic             dout_valid,
  output logic             empty,
  output logic             full,
  output logic [PTR_W:0]   count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W:0]   wptr, rptr;
  logic             do_wr, do_rd;

  assign count = wptr - rptr;
  assign empty = (wptr == rptr);
  assign full  = (wptr[PTR_W] != rptr[PTR_W]) && (wptr[PTR_W-1:0] == rptr[PTR_W-1:0]);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[PTR_W-1:0]] <= din;
    if (do_rd) dout <= mem[rptr[PTR_W-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr       <= '0;
      rptr       <= '0;
      dout_valid <= 1'b0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
      dout_valid <= do_rd;
    end
  end

endmodule
