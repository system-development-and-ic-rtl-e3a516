// vdelay: time alignment of the three vertical taps.
//
// The line memory returns the 1H-delayed sample one clock late and the
// 2H-delayed sample two clocks late.  This block delays the current line by two
// clocks and the 1H line by one so that all three taps of one column arrive
// together, and delays `line_start` / `frame_start` by the same two clocks.
// Memory words read before the memory has been filled (`ok1` / `ok2` low) are
// marked inactive.  Outputs are registered; latency 2 clocks from `cur`.
// The oldest tap's pixel bits are wired straight through from `d2`: that
// memory output is already the latest of the three, so only its active flag
// is gated.
// The document only names a "Delay" block in the vertical scaler; what it
// aligns here is this design's choice.
module vdelay
  import scaler_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t cur,          // current line, at t
  input  sample_t d1,           // 1H delayed, at t+1
  input  sample_t d2,           // 2H delayed, at t+2
  input  logic    ok1,          // at t
  input  logic    ok2,          // at t
  input  logic    line_start,   // at t
  input  logic    frame_start,  // at t
  output sample_t tap0,         // newest line
  output sample_t tap1,         // centre line (1H)
  output sample_t tap2,         // oldest line (2H)
  output logic    line_start_a,
  output logic    frame_start_a
);

  sample_t   cur_q, cur_qq, d1_q;
  logic [1:0] ok1_q, ok2_q, ls_q, fs_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q  <= '0;
      cur_qq <= '0;
      d1_q   <= '0;
      ok1_q  <= '0;
      ok2_q  <= '0;
      ls_q   <= '0;
      fs_q   <= '0;
    end else begin
      cur_q  <= cur;
      cur_qq <= cur_q;
      d1_q   <= d1;
      ok1_q  <= {ok1_q[0], ok1};
      ok2_q  <= {ok2_q[0], ok2};
      ls_q   <= {ls_q[0], line_start};
      fs_q   <= {fs_q[0], frame_start};
    end
  end

  always_comb begin
    tap0          = cur_qq;
    tap1          = d1_q;
    tap1.de       = d1_q.de & ok1_q[1];
    tap2          = d2;
    tap2.de       = d2.de & ok2_q[1];
    line_start_a  = ls_q[1];
    frame_start_a = fs_q[1];
  end

endmodule
