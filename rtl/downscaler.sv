// downscaler: image downscaler with phase-correction digital filters.
//
// Reduces a video image by an arbitrary ratio in each direction with 1/32
// line vertical and 1/64 pixel horizontal precision, at one sample per clock
// (13.5 MHz pixel clock in the target application), without any up-sampling.
// Rather than dropping pixels, every output sample is computed by a short
// low-pass filter whose group delay is shifted to the exact position of the
// output sample between its input neighbours.
//
// Data path, in order:
//   line_memory  two cascaded 1H delays (Sram1, Sram2) giving three lines
//   vdelay       aligns the three lines of one column
//   vfilter      3-tap, 32-phase vertical filter, phase from the vertical DTO
//   comp_filter  5-tap high-boost compensation filter
//   hfilter      5-tap, 64-phase horizontal filter, phase from the horizontal DTO
//   fifo         stores only the samples both DTOs mark valid
// Control: vdto (once per line), hdto (once per active sample), time_align
// (lines the DTO decisions up with the data), fifo_ctrl (write enable).
//
// Interface: `pix_in` with its active-picture flag `de_in`, one sample per
// clock.  `line_start` pulses on the first clock of every line period,
// blanking lines included; `frame_start` pulses together with the
// `line_start` of the frame's first active line.  The line period must not
// exceed LINE_DEPTH clocks and `de_in` must be low on the clock of
// `line_start`; assertions check the latter and that `frame_start` comes with
// `line_start`.  Keep at least 4 inactive clocks around the active part of
// each line, and follow the last active line of a frame by at least one line
// period so the last output line can be computed.
// `v_ratio` / `h_ratio` are the reduction ratios in unsigned 6.6 fixed point
// (input samples per output sample, 1.0 to 63.98; 2.546875 = 163), taken at
// the start of each frame / line.  The scaled image is read from the FIFO
// with `rd_en`; `dout` follows one clock later with `dout_valid`.
// Latency: an output sample is written into the FIFO on the 5th clock edge
// after the last input sample it depends on was presented at `pix_in`; that
// sample lies 4 columns right of the output's centre column, in the line below
// its centre line.
// The block split, the filter sizes and the 1/512 gain follow the document;
// coefficients, interfaces and handshakes are this design's choices.
module downscaler
  import scaler_pkg::*;
#(
  parameter int unsigned LINE_DEPTH = 858,
  parameter int unsigned FIFO_DEPTH = 1024
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [PIX_W-1:0]           pix_in,
  input  logic                       de_in,
  input  logic                       line_start,
  input  logic                       frame_start,
  input  logic [RATIO_W-1:0]         v_ratio,
  input  logic [RATIO_W-1:0]         h_ratio,
  input  logic                       rd_en,
  input  logic                       clr_ovf,
  output logic [PIX_W-1:0]           dout,
  output logic                       dout_valid,
  output logic                       empty,
  output logic                       full,
  output logic                       overflow,
  output logic [$clog2(FIFO_DEPTH):0] count
);

  sample_t din, d1, d2, tap0, tap1, tap2, vout;
  logic    ok1, ok2, ls_a, fs_a;

  assign din = '{de: de_in, pix: pix_in};

  // ---- line memory ----
  line_memory #(.DEPTH(LINE_DEPTH)) u_line_memory (
    .clk, .rst_n, .line_start, .din, .d1, .d2, .ok1, .ok2
  );

  // ---- vertical scaler ----
  vdelay u_vdelay (
    .clk, .rst_n, .cur(din), .d1, .d2, .ok1, .ok2, .line_start, .frame_start,
    .tap0, .tap1, .tap2, .line_start_a(ls_a), .frame_start_a(fs_a)
  );

  logic              v_line_en, vout_line_en;
  logic [VSEL_W-1:0] sel_v;

  vdto u_vdto (
    .clk, .rst_n, .line_start(ls_a), .frame_start(fs_a), .ratio(v_ratio),
    .line_en(v_line_en), .sel(sel_v)
  );

  vfilter u_vfilter (
    .clk, .rst_n, .tap0, .tap1, .tap2, .sel(sel_v), .line_en(v_line_en),
    .dout(vout), .line_en_out(vout_line_en)
  );

  // ---- horizontal scaler ----
  logic signed [COMP_W-1:0] outcompen;
  logic                     h_pix_en, pix_en_a, line_en_a, hvalid;
  logic [HSEL_W-1:0]        sel_h, sel_h_a;
  logic [PIX_W-1:0]         data_outh;

  comp_filter u_comp_filter (
    .clk, .rst_n, .din(vout.pix), .outcompen
  );

  hdto u_hdto (
    .clk, .rst_n, .de(vout.de), .ratio(h_ratio), .pix_en(h_pix_en), .sel(sel_h)
  );

  time_align u_time_align (
    .clk, .rst_n, .pix_en(h_pix_en), .sel_h, .line_en(vout_line_en),
    .pix_en_a, .sel_h_a, .line_en_a
  );

  hfilter u_hfilter (
    .clk, .rst_n, .outcompen, .sel_h(sel_h_a), .en(pix_en_a),
    .data_outh, .valid(hvalid)
  );

  // ---- FIFO ----
  logic wr_en;

  fifo_ctrl u_fifo_ctrl (
    .clk, .rst_n, .pix_en(hvalid), .line_en(line_en_a), .full, .clr_ovf,
    .wr_en, .overflow
  );

  fifo #(.WIDTH(PIX_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .wr_en, .din(data_outh), .rd_en, .dout, .dout_valid,
    .empty, .full, .count
  );

  // Input timing rules: a frame starts on a line start, and active samples
  // never coincide with the first clock of a line period.
  a_frame_on_line: assert property (@(posedge clk) disable iff (!rst_n)
    frame_start |-> line_start)
    else $error("frame_start without line_start");
  a_de_not_at_line_start: assert property (@(posedge clk) disable iff (!rst_n)
    line_start |-> !de_in)
    else $error("active sample on the first clock of a line period");

endmodule
