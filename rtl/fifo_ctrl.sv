// fifo_ctrl: FIFO enable control.
//
// A horizontally scaled sample is kept only where both DTOs agree: the
// horizontal DTO's valid-pixel enable and the vertical DTO's valid-line enable,
// so the FIFO receives only the valid downscaled data.  A write that finds the
// FIFO full is dropped and sets the sticky `overflow` flag, which `clr_ovf`
// clears.  `wr_en` is combinational so the write happens in the clock the
// sample is presented.  The enable rule follows the document; the overflow
// handling is this design's own.
module fifo_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic pix_en,
  input  logic line_en,
  input  logic full,
  input  logic clr_ovf,
  output logic wr_en,
  output logic overflow
);

  logic want;

  assign want  = pix_en & line_en;
  assign wr_en = want & ~full;

  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> !full)
    else $error("write enable into a full FIFO");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          overflow <= 1'b0;
    else if (want & full) overflow <= 1'b1;
    else if (clr_ovf)     overflow <= 1'b0;
  end

endmodule
