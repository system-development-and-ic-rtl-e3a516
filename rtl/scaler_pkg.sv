// scaler_pkg: widths, constants and coefficient tables shared by the downscaler.
//
// The vertical scaler uses a 3-tap, 32-phase filter and the horizontal scaler a
// 5-tap, 64-phase filter; every phase's coefficients sum to 512 (gain 1/512), as
// in the design this RTL follows. The coefficient values themselves are this
// design's choice: each phase is the Lagrange interpolator through the taps,
// evaluated at the fractional shift s of that phase and rounded to an integer
// in units of 1/512:
//
//   c_k(s) = 512 * prod_{j != k} (s - j) / (k - j),   k, j in {-R .. R}
//
// with R = 1 (vertical) or R = 2 (horizontal).  Tap offset k = +R is the newest
// sample, k = 0 the centre, k = -R the oldest.  Phase p maps to
// s = (p - P/2) / P for P phases, so s runs from -0.5 to just under +0.5 and
// the filter's group delay is shifted by s around the centre tap.  After
// rounding, the centre tap absorbs the remainder so each phase sums to exactly
// 512.  An interpolator of this kind has unity gain at DC, a low-pass response,
// and an exact delay shift s for slowly varying signals, which is the role of
// the phase-correction filters.  The tables are computed by constant functions
// at elaboration time, so no coefficient file is needed.
package scaler_pkg;

  localparam int unsigned PIX_W      = 8;   // pixel width (8-bit video)
  localparam int unsigned COMP_W     = 9;   // compensation filter output (Outcompen)
  localparam int unsigned ACC_W      = 19;  // multi-operand adder width
  localparam int unsigned COEF_W     = 11;  // signed coefficient width (|c| <= 512)
  localparam int unsigned NORM_SHIFT = 9;   // gain normalisation 1/512
  localparam int unsigned FRAC_W     = 6;   // DTO fraction bits: 1/64 precision
  localparam int unsigned RATIO_W    = 12;  // scaling ratio, unsigned 6.6 fixed point

  localparam int unsigned BLANK_LEVEL = 16;  // value output outside the active picture

  // One video sample with its active-picture flag, as stored in the line memory.
  typedef struct packed {
    logic             de;
    logic [PIX_W-1:0] pix;
  } sample_t;

  localparam int unsigned V_TAPS   = 3;
  localparam int unsigned V_PHASES = 32;
  localparam int unsigned VSEL_W   = 5;
  localparam int unsigned H_TAPS   = 5;
  localparam int unsigned H_PHASES = 64;
  localparam int unsigned HSEL_W   = 6;

  typedef logic signed [COEF_W-1:0] coef_t;

  // Rounded integer division, halves away from zero; d > 0.
  function automatic longint round_div(longint n, longint d);
    if (n >= 0) return (n + d / 2) / d;
    else        return -((-n + d / 2) / d);
  endfunction

  // Lagrange coefficient of tap offset k (in -r..r) for shift s = t / phases,
  // in units of 1/512, before the sum correction.
  function automatic longint lagrange_coef(longint r, longint k, longint t, longint phases);
    longint num, den, dt, dk;
    num = 512;
    den = 1;
    for (longint j = -r; j <= r; j++) begin
      if (j != k) begin
        dt  = t - j * phases;
        dk  = (k - j) * phases;
        num = num * dt;
        den = den * dk;
      end
    end
    if (den < 0) begin
      num = -num;
      den = -den;
    end
    return round_div(num, den);
  endfunction

  // Coefficient of one tap of one phase.  Tap index i = 0 is the newest tap
  // (offset +r); the centre tap i = r takes 512 minus the other taps.
  function automatic longint phase_coef(longint r, longint phase, longint phases, longint i);
    longint sum;
    longint t;
    t = phase - phases / 2;
    if (i != r) return lagrange_coef(r, r - i, t, phases);
    sum = 0;
    for (longint m = 0; m < 2 * r + 1; m++)
      if (m != r) sum += lagrange_coef(r, r - m, t, phases);
    return 512 - sum;
  endfunction

  // Tables as packed arrays: [phase][tap] of signed COEF_W-bit words.
  typedef logic [V_PHASES-1:0][V_TAPS-1:0][COEF_W-1:0] vtable_t;
  typedef logic [H_PHASES-1:0][H_TAPS-1:0][COEF_W-1:0] htable_t;

  function automatic vtable_t build_vtable();
    vtable_t tbl;
    for (int p = 0; p < V_PHASES; p++)
      for (int k = 0; k < V_TAPS; k++)
        tbl[p][k] = COEF_W'(phase_coef(1, p, V_PHASES, k));
    return tbl;
  endfunction

  function automatic htable_t build_htable();
    htable_t tbl;
    for (int p = 0; p < H_PHASES; p++)
      for (int k = 0; k < H_TAPS; k++)
        tbl[p][k] = COEF_W'(phase_coef(2, p, H_PHASES, k));
    return tbl;
  endfunction

  localparam vtable_t VCOEF = build_vtable();
  localparam htable_t HCOEF = build_htable();

endpackage
