// hfilter: 5-tap, 64-phase horizontal phase-correction filter (multiplexer-adder form).
//
// The compensation filter output (Outcompen, 9-bit signed) runs through a chain
// of four registers, giving five taps; tap 2 is the centre.  The 6-bit select
// Sel_h picks one of 64 coefficient sets (see scaler_pkg), each shifting the
// group delay by Sel_h/64 - 1/2 pixel around the centre tap.  Instead of
// computing 64 filter outputs and selecting one, the coefficients are
// multiplexed first: each coefficient's magnitude bits choose which
// left-shifted copies of its tap enter one multi-operand 19-bit adder, and its
// sign chooses add or subtract.  The sum is limited to the 8-bit signed range
// after normalisation, divided by 512 (arithmetic shift), moved back to an
// unsigned pixel (+128) and registered as Data_outh.  `valid` is `en`
// delayed by the same register.  Latency from the centre sample at `outcompen`
// to Data_outh: 3 clocks.
// The structure (four registers, coefficient multiplexer, one adder of 19 bits,
// limit, /512, output register, 9-bit input, 6-bit select) follows the
// document; the coefficient values and the signed-around-mid-grey data format
// are this design's choices.
module hfilter
  import scaler_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [COMP_W-1:0] outcompen,
  input  logic [HSEL_W-1:0]        sel_h,
  input  logic                     en,
  output logic [PIX_W-1:0]         data_outh,
  output logic                     valid
);

  localparam int unsigned MAG_W = COEF_W - 1;
  localparam logic signed [ACC_W-1:0] LIM_HI = ACC_W'(((1 << (PIX_W - 1)) << NORM_SHIFT) - 1);
  localparam logic signed [ACC_W-1:0] LIM_LO = -ACC_W'((1 << (PIX_W - 1)) << NORM_SHIFT);

  logic signed [COMP_W-1:0] dly [1:H_TAPS-1];
  logic signed [COMP_W-1:0] x [H_TAPS];
  logic signed [COEF_W-1:0] c [H_TAPS];
  logic [MAG_W-1:0]         mag [H_TAPS];
  logic signed [ACC_W-1:0]  term, sum, lim;
  logic signed [PIX_W-1:0]  y;

  always_comb begin
    x[0] = outcompen;
    for (int k = 1; k < int'(H_TAPS); k++) x[k] = dly[k];
    sum = '0;
    for (int k = 0; k < int'(H_TAPS); k++) begin
      c[k]   = HCOEF[sel_h][k];
      mag[k] = c[k][COEF_W-1] ? MAG_W'(-c[k]) : c[k][MAG_W-1:0];
      for (int b = 0; b < int'(MAG_W); b++) begin
        term = mag[k][b] ? (ACC_W'(x[k]) <<< b) : '0;
        sum  = c[k][COEF_W-1] ? sum - term : sum + term;
      end
    end
    if (sum > LIM_HI)      lim = LIM_HI;
    else if (sum < LIM_LO) lim = LIM_LO;
    else                   lim = sum;
    y = PIX_W'(lim >>> NORM_SHIFT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 1; k < int'(H_TAPS); k++) dly[k] <= '0;
      data_outh <= '0;
      valid     <= 1'b0;
    end else begin
      for (int k = 1; k < int'(H_TAPS); k++) dly[k] <= x[k-1];
      data_outh <= PIX_W'(y ^ (1 << (PIX_W - 1)));  // + 128
      valid     <= en;
    end
  end

endmodule
