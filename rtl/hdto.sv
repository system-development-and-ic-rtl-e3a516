// hdto: horizontal discrete time oscillator.
//
// Generates the valid-pixel enable and the 6-bit filter select (Sel_h) of the
// horizontal filter, one decision per active sample of the vertically scaled
// stream.  Same arithmetic as the vertical DTO but with 64 phases: R is the
// unsigned 6.6 fixed-point ratio (1/64 pixel units), restarted with a bias of
// 32 at the first active sample of every line:
//   a      = (first active sample) ? 32 : acc
//   pix_en = de && a < 64
//   sel    = a[5:0]         -- shift s = sel/64 - 1/2 pixel
//   acc    = a - 64 + (a < 64 ? R : 0)        (only while de is high)
// Outputs are registered: they refer to the sample presented one clock
// earlier.  The ratio is taken at the start of each line; ratios below 1.0 are
// treated as 1.0.  Role from the document, arithmetic this design's own.
module hdto
  import scaler_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               de,
  input  logic [RATIO_W-1:0] ratio,
  output logic               pix_en,
  output logic [HSEL_W-1:0]  sel
);

  logic [RATIO_W:0]   acc, a, acc_next;
  logic [RATIO_W-1:0] ratio_q, ratio_eff, r;
  logic               de_prev, first, fire;

  always_comb begin
    ratio_eff = (ratio < RATIO_W'(64)) ? RATIO_W'(64) : ratio;
    first     = de && !de_prev;
    r         = first ? ratio_eff : ratio_q;
    a         = first ? (RATIO_W + 1)'(32) : acc;
    fire      = a < (RATIO_W + 1)'(64);
    acc_next  = a - (RATIO_W + 1)'(64) + (fire ? {1'b0, r} : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      ratio_q <= RATIO_W'(64);
      de_prev <= 1'b0;
      pix_en  <= 1'b0;
      sel     <= '0;
    end else begin
      de_prev <= de;
      pix_en  <= de && fire;
      sel     <= a[HSEL_W-1:0];
      if (first) ratio_q <= ratio_eff;
      if (de) acc <= acc_next;
    end
  end

endmodule
