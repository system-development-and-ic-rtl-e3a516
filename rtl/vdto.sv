// vdto: vertical discrete time oscillator.
//
// Decides, once per line, whether an output line is produced with the current
// centre line of the vertical filter and with which of the 32 filter phases.
// The scaling ratio R (input lines per output line) is an unsigned 6.6 fixed
// point number, i.e. in units of 1/64 line; 2.546875 is 163.  Output line k
// lies at input line position k*R.  The oscillator keeps `acc`, the distance
// in 1/64 line from the current centre line to the next output line, plus a
// bias of one half line.  At each line start:
//   a       = (first line of the frame) ? 32 : acc
//   line_en = a < 64        -- the next output line falls within +-1/2 line
//   sel     = a[5:1]        -- shift s = sel/32 - 1/2 line, 32 phases
//   acc     = a - 64 + (line_en ? R : 0)
// `line_en` and `sel` are registered and hold for the whole line.  The centre
// line is the 1H-delayed one, so the frame's first centre line starts one line
// after `frame_start`.  Ratios below 1.0 are treated as 1.0 (downscaling only).
// The DTO's role (valid line enable and filter select from the ratio) follows
// the document; the accumulator arithmetic is this design's own.
module vdto
  import scaler_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               line_start,
  input  logic               frame_start,
  input  logic [RATIO_W-1:0] ratio,
  output logic               line_en,
  output logic [VSEL_W-1:0]  sel
);

  logic [RATIO_W:0]   acc, a, acc_next;
  logic [RATIO_W-1:0] ratio_q, ratio_eff;
  logic               fs_prev, running, fire;

  always_comb begin
    ratio_eff = (ratio < RATIO_W'(64)) ? RATIO_W'(64) : ratio;
    a         = fs_prev ? (RATIO_W + 1)'(32) : acc;
    fire      = a < (RATIO_W + 1)'(64);
    acc_next  = a - (RATIO_W + 1)'(64) + (fire ? {1'b0, fs_prev ? ratio_eff : ratio_q} : '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      ratio_q <= RATIO_W'(64);
      fs_prev <= 1'b0;
      running <= 1'b0;
      line_en <= 1'b0;
      sel     <= '0;
    end else if (line_start) begin
      fs_prev <= frame_start;
      if (fs_prev) begin
        ratio_q <= ratio_eff;
        running <= 1'b1;
      end
      if (fs_prev || running) begin
        acc     <= acc_next;
        line_en <= fire;
        sel     <= a[FRAC_W-1:1];
      end
    end
  end

endmodule
