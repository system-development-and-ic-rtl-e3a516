// time_align: aligns the DTO decisions with the filter data path.
//
// The horizontal DTO decides for a sample one clock after it leaves the
// vertical filter, but the horizontal filter needs that decision when the
// sample sits in its centre tap, after the compensation filter and two
// horizontal delay registers.  Likewise the valid-line enable leaves the
// vertical filter with the sample and must reach the FIFO enable control
// together with the horizontal filter's output.  This block is two register
// pipelines: {pixel enable, Sel_h} delayed by PIX_DELAY clocks, and the line
// enable delayed by LINE_DELAY clocks.  The defaults fit the pipeline of this
// design (compensation filter 1 register + 2 samples of group delay,
// horizontal filter 2 centre-tap registers + 1 output register).
// The document only names a time-alignment block; the delays are this
// design's.
module time_align
  import scaler_pkg::*;
#(
  parameter int unsigned PIX_DELAY  = 4,
  parameter int unsigned LINE_DELAY = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              pix_en,
  input  logic [HSEL_W-1:0] sel_h,
  input  logic              line_en,
  output logic              pix_en_a,
  output logic [HSEL_W-1:0] sel_h_a,
  output logic              line_en_a
);

  typedef struct packed {
    logic              en;
    logic [HSEL_W-1:0] sel;
  } hctl_t;

  hctl_t pix_pipe [PIX_DELAY];
  logic [LINE_DELAY-1:0] line_pipe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(PIX_DELAY); i++) pix_pipe[i] <= '0;
      line_pipe <= '0;
    end else begin
      pix_pipe[0] <= '{en: pix_en, sel: sel_h};
      for (int i = 1; i < int'(PIX_DELAY); i++) pix_pipe[i] <= pix_pipe[i-1];
      line_pipe <= {line_pipe[LINE_DELAY-2:0], line_en};
    end
  end

  assign pix_en_a  = pix_pipe[PIX_DELAY-1].en;
  assign sel_h_a   = pix_pipe[PIX_DELAY-1].sel;
  assign line_en_a = line_pipe[LINE_DELAY-1];

endmodule
