// vfilter: 3-tap, 32-phase vertical phase-correction filter.
//
// Inputs are the three vertically adjacent samples of one column: the newest
// line (tap0), the 1H-delayed centre line (tap1) and the 2H-delayed line
// (tap2).  The 5-bit select picks one of 32 coefficient sets, each a low-pass
// interpolator whose group delay is shifted by sel/32 - 1/2 line around the
// centre line (see scaler_pkg).  The filter uses the multiplexer-adder form:
// the coefficients are multiplexed first, and each tap's contribution is
// formed by adding left-shifted copies of the sample selected by the bits of
// the chosen coefficient's magnitude, all summed in a single 19-bit adder.  The
// sum is limited to the 8-bit range after the 1/512 gain normalisation and
// divided by 512 (truncated).
// If an outer line lies outside the active picture its tap repeats the centre
// sample; if the centre sample is outside the active picture the output is
// BLANK_LEVEL.  The output sample keeps the centre line's active flag, and the
// valid-line enable travels with it.  One clock of latency.
// The tap count, phase count, gain 1/512, 19-bit sum and the
// multiplexer-adder form follow the document; the coefficient values, the
// edge handling and the truncating division are this design's choices.
module vfilter
  import scaler_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  sample_t           tap0,
  input  sample_t           tap1,
  input  sample_t           tap2,
  input  logic [VSEL_W-1:0] sel,
  input  logic              line_en,
  output sample_t           dout,
  output logic              line_en_out
);

  localparam int unsigned MAG_W = COEF_W - 1;
  localparam logic signed [ACC_W-1:0] MAX_SUM = ACC_W'(((1 << PIX_W) << NORM_SHIFT) - 1);

  logic [PIX_W-1:0]             x [V_TAPS];
  logic signed [COEF_W-1:0]     c [V_TAPS];
  logic [MAG_W-1:0]             mag [V_TAPS];
  logic signed [ACC_W-1:0]      term, sum;
  logic [PIX_W-1:0]             y;

  always_comb begin
    x[0] = tap0.de ? tap0.pix : tap1.pix;
    x[1] = tap1.pix;
    x[2] = tap2.de ? tap2.pix : tap1.pix;
    sum  = '0;
    for (int k = 0; k < V_TAPS; k++) begin
      // filter coefficient multiplexer
      c[k]   = VCOEF[sel][k];
      mag[k] = c[k][COEF_W-1] ? MAG_W'(-c[k]) : c[k][MAG_W-1:0];
      // shifted copies of the tap selected by the coefficient bits
      for (int b = 0; b < int'(MAG_W); b++) begin
        term = mag[k][b] ? (ACC_W'(x[k]) << b) : '0;
        sum  = c[k][COEF_W-1] ? sum - term : sum + term;
      end
    end
    // limit, then divide by 512
    if (sum < 0)            y = '0;
    else if (sum > MAX_SUM) y = '1;
    else                    y = PIX_W'(sum >>> NORM_SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout        <= '0;
      line_en_out <= 1'b0;
    end else begin
      dout.de     <= tap1.de;
      dout.pix    <= tap1.de ? y : PIX_W'(BLANK_LEVEL);
      line_en_out <= line_en;
    end
  end

endmodule
