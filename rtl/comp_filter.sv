// comp_filter: 5-tap high-frequency compensation filter.
//
// Sits in front of the horizontal filter and boosts the high frequencies that
// the horizontal interpolator attenuates, so that the cascade keeps a wide
// passband.  The 8-bit pixel is first made signed around mid-grey
// (x = pix - 128), then filtered with the symmetric kernel
//   h = [-1, -2, 22, -2, -1] / 16
// (unity gain at DC, gain 1.5 at half the sample rate), built from shifts and
// adds.  |result| <= 224, so the 9-bit signed output (Outcompen) never
// overflows.  The division by 16 truncates toward minus infinity.  Group delay
// 2 samples; the output register adds one clock, so the output for centre
// sample n appears three clocks after sample n is at the input.
// The document gives the tap count, the purpose and the 9-bit output width;
// the coefficients and the mid-grey offset are this design's choices.
module comp_filter
  import scaler_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [PIX_W-1:0]         din,
  output logic signed [COMP_W-1:0] outcompen
);

  logic signed [PIX_W-1:0] x [5];
  logic signed [PIX_W-1:0] d [1:4];
  logic signed [15:0]      acc;

  always_comb begin
    x[0] = PIX_W'(din ^ (1 << (PIX_W - 1)));   // pix - 128
    for (int i = 1; i < 5; i++) x[i] = d[i];
    acc = (16'(x[2]) <<< 4) + (16'(x[2]) <<< 2) + (16'(x[2]) <<< 1)
        - (16'(x[1]) <<< 1) - (16'(x[3]) <<< 1)
        - 16'(x[0]) - 16'(x[4]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < 5; i++) d[i] <= '0;
      outcompen <= '0;
    end else begin
      for (int i = 1; i < 5; i++) d[i] <= x[i-1];
      outcompen <= COMP_W'(acc >>> 4);
    end
  end

endmodule
