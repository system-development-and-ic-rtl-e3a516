// tb_downscaler: end-to-end test of the downscaler at its default parameters.
//
// Frame 1 is a 300 x 300 circular zone plate (frequencies from 0 up to half
// the sample rate) reduced by 2.546875 in both directions to 118 x 118.  The
// FIFO is read every clock and each output pixel is compared with a reference
// computed here from first principles: Lagrange coefficients worked out in
// floating point, edge rules and 1/512 normalisation applied pixel by pixel.
// Frame 2 uses a random image of 40 x 24 with different ratios (1.0 across,
// 3.5 down).  Frame 3 is read by nobody, so the FIFO fills and overflows.
// Mechanisms counted, each of which must occur: dropped lines, dropped pixels,
// every one of the 32 vertical and 64 horizontal phases, edge replication in
// the vertical filter, the horizontal limiter, FIFO full and overflow.
// The input streams one sample per clock; the test also checks the latency:
// the first output is written into the FIFO 5 clocks after the last input
// sample it depends on.
module tb_downscaler;
  import scaler_pkg::*;

  localparam int MAXW = 720, MAXH = 320;
  localparam int HBL_PRE = 20, HBL_POST = 24;

  logic clk = 0, rst_n = 0;
  logic [7:0] pix_in = 0;
  logic de_in = 0, line_start = 0, frame_start = 0, rd_en, clr_ovf = 0;
  logic [11:0] v_ratio = 163, h_ratio = 163;
  logic [7:0] dout;
  logic dout_valid, empty, full, overflow;
  logic [10:0] count;

  downscaler dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int img [MAXH][MAXW];
  int expq [$];
  int gotq [$];
  real vc [32][3];
  real hc [64][5];
  int ivc [32][3];
  int ihc [64][5];

  // ---- reference coefficients ----
  function automatic int rnd(real x);
    if (x >= 0) return int'($floor(x + 0.5));
    else        return -int'($floor(-x + 0.5));
  endfunction

  function automatic real lag(int r, int k, real s);
    real w = 1.0;
    for (int j = -r; j <= r; j++) if (j != k) w = w * (s - j) / (k - j);
    return w;
  endfunction

  task automatic make_coefs();
    for (int p = 0; p < 32; p++) begin
      automatic real s = (p - 16) / 32.0;
      automatic int sum = 0;
      for (int i = 0; i < 3; i++) if (i != 1) begin
        ivc[p][i] = rnd(512.0 * lag(1, 1 - i, s));
        sum += ivc[p][i];
      end
      ivc[p][1] = 512 - sum;
    end
    for (int p = 0; p < 64; p++) begin
      automatic real s = (p - 32) / 64.0;
      automatic int sum = 0;
      for (int i = 0; i < 5; i++) if (i != 2) begin
        ihc[p][i] = rnd(512.0 * lag(2, 2 - i, s));
        sum += ihc[p][i];
      end
      ihc[p][2] = 512 - sum;
    end
  endtask

  function automatic int floordiv(int a, int b);
    int q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  // ---- reference model of one frame ----
  task automatic model(int w, int h, int rv, int rh);
    int vline [MAXW + 16];
    int comp [MAXW + 16];
    for (int k = 0; ; k++) begin
      automatic int q = k * rv + 32;
      automatic int m = q >> 6;
      automatic int sv = (q & 63) >> 1;
      if (m >= h) break;
      // vertical filter, indices shifted by 8 so the margins are blank
      for (int c = -8; c < w + 8; c++) begin
        if (c < 0 || c >= w) vline[c + 8] = 16;
        else begin
          automatic int p0 = (m + 1 < h) ? img[m + 1][c] : img[m][c];
          automatic int p1 = img[m][c];
          automatic int p2 = (m >= 1) ? img[m - 1][c] : img[m][c];
          automatic int s = ivc[sv][0] * p0 + ivc[sv][1] * p1 + ivc[sv][2] * p2;
          if (s < 0) s = 0;
          if (s > 255 * 512 + 511) s = 255 * 512 + 511;
          vline[c + 8] = s >> 9;
        end
      end
      for (int c = -6; c < w + 6; c++) begin
        automatic int u [5];
        for (int d = -2; d <= 2; d++) u[d + 2] = vline[c + d + 8] - 128;
        comp[c + 8] = floordiv(22 * u[2] - 2 * u[1] - 2 * u[3] - u[0] - u[4], 16);
      end
      for (int j = 0; ; j++) begin
        automatic int qh = j * rh + 32;
        automatic int n = qh >> 6;
        automatic int sh = qh & 63;
        automatic int s = 0;
        if (n >= w) break;
        for (int i = 0; i < 5; i++) s += ihc[sh][i] * comp[n + 2 - i + 8];
        if (s > 127 * 512 + 511) s = 127 * 512 + 511;
        if (s < -128 * 512) s = -128 * 512;
        expq.push_back(floordiv(s, 512) + 128);
      end
    end
  endtask

  // ---- stimulus ----
  task automatic send_frame(int w, int h, int pre_lines, int post_lines, int lp = 0);
    if (lp == 0) lp = w + HBL_PRE + HBL_POST;
    for (int l = -pre_lines; l < h + post_lines; l++) begin
      for (int c = 0; c < lp; c++) begin
        line_start  <= (c == 0);
        frame_start <= (c == 0) && (l == 0);
        de_in       <= (l >= 0 && l < h && c >= HBL_PRE && c < HBL_PRE + w);
        pix_in      <= (l >= 0 && l < h && c >= HBL_PRE && c < HBL_PRE + w) ? 8'(img[l][c - HBL_PRE]) : 8'd16;
        @(posedge clk);
      end
    end
    line_start <= 0; frame_start <= 0; de_in <= 0; pix_in <= 16;
  endtask

  // FIFO reader
  always @(posedge clk) begin
    if (dout_valid) gotq.push_back(int'(dout));
  end
  assign rd_en = reader_on && !empty;
  logic reader_on = 1;

  // ---- latency: first FIFO write of a frame against the last input sample
  // it needs (line 1, column 4: the newest vertical tap of the compensation
  // filter's newest tap for output (0,0)) ----
  longint cyc = 0, t_in = -1, t_wr = -1;
  int lines_in_frame = -1, col = 0;
  always @(posedge clk) begin
    cyc++;
    if (frame_start) lines_in_frame = 0;
    else if (line_start && lines_in_frame >= 0) lines_in_frame++;
    if (line_start) col = 0;
    else if (de_in) col++;
    if (de_in && line_start == 0 && lines_in_frame == 1 && t_in < 0 && col == 4 + 1) t_in = cyc;
    if (dut.wr_en && t_wr < 0 && t_in >= 0) t_wr = cyc;
  end

  // ---- mechanism counters (observed inside the design) ----
  int n_line_drop = 0, n_pix_drop = 0, n_edge = 0, n_limit = 0, n_full = 0;
  bit vphase_seen [32];
  bit hphase_seen [64];
  logic ls_d;
  always @(posedge clk) begin
    ls_d <= dut.u_vdto.line_start;
    if (ls_d && dut.u_vdto.running && !dut.u_vdto.line_en) n_line_drop++;
    if (ls_d && dut.u_vdto.line_en) vphase_seen[dut.u_vdto.sel] = 1;
    if (dut.vout.de && !dut.h_pix_en && dut.u_hdto.de_prev) n_pix_drop++;
    if (dut.pix_en_a && dut.line_en_a) hphase_seen[dut.sel_h_a] = 1;
    if (dut.tap1.de && (!dut.tap0.de || !dut.tap2.de)) n_edge++;
    if (dut.pix_en_a && (dut.u_hfilter.sum > dut.u_hfilter.LIM_HI || dut.u_hfilter.sum < dut.u_hfilter.LIM_LO)) n_limit++;
    if (full) n_full++;
  end

  task automatic compare(string tag);
    checks++;
    if (gotq.size() != expq.size()) begin
      failures++;
      $display("%s: %0d outputs, expected %0d", tag, gotq.size(), expq.size());
    end
    for (int i = 0; i < gotq.size() && i < expq.size(); i++) begin
      checks++;
      if (gotq[i] != expq[i]) begin
        failures++;
        if (failures < 10) $display("%s: output %0d = %0d, expected %0d", tag, i, gotq[i], expq[i]);
      end
    end
    gotq.delete();
    expq.delete();
  endtask

  initial begin
    int cyc_last_in, cyc_last_out;
    make_coefs();
    // frame 1: circular zone plate, 300 x 300
    for (int y = 0; y < 300; y++)
      for (int x = 0; x < 300; x++) begin
        automatic real r2 = (x - 150.0) * (x - 150.0) + (y - 150.0) * (y - 150.0);
        img[y][x] = rnd(128.0 + 127.0 * $cos(3.14159265358979 * r2 / 300.0));
      end
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    model(300, 300, 163, 163);
    checks++;
    if (expq.size() != 118 * 118) begin
      failures++;
      $display("reference model gives %0d pixels, expected 118 x 118", expq.size());
    end
    send_frame(300, 300, 3, 2);
    repeat (40) @(posedge clk);
    compare("zone plate");
    checks++;
    if (t_wr - t_in != 5) begin
      failures++;
      $display("latency: first write %0d clocks after line 1 column 4 entered, expected 5", t_wr - t_in);
    end

    // frame 2: random image, ratio 1.0 across and 3.5 down
    for (int y = 0; y < 24; y++)
      for (int x = 0; x < 40; x++) img[y][x] = $urandom_range(255);
    v_ratio = 224; h_ratio = 64;
    model(40, 24, 224, 64);
    send_frame(40, 24, 2, 2);
    repeat (40) @(posedge clk);
    compare("random 40x24");

    // frame 3: full BT.601 line, 720 active samples in an 858-clock line period
    for (int y = 0; y < 20; y++)
      for (int x = 0; x < 720; x++) img[y][x] = $urandom_range(255);
    v_ratio = 100; h_ratio = 96;
    model(720, 20, 100, 96);
    send_frame(720, 20, 2, 2, 858);
    repeat (40) @(posedge clk);
    checks++;
    if (overflow) begin failures++; $display("overflow while the FIFO was read"); end
    compare("BT.601 line 720 of 858");

    // frame 4: nobody reads, FIFO must fill and report overflow
    reader_on = 0;
    for (int y = 0; y < 60; y++)
      for (int x = 0; x < 40; x++) img[y][x] = (x * 7 + y * 3) & 255;
    v_ratio = 64; h_ratio = 64;
    send_frame(40, 60, 2, 2);
    repeat (40) @(posedge clk);
    checks++;
    if (!full || !overflow || count != 11'd1024) begin
      failures++;
      $display("overflow: full=%0d overflow=%0d count=%0d", full, overflow, count);
    end
    clr_ovf <= 1; @(posedge clk); clr_ovf <= 0; @(posedge clk);
    checks++;
    if (overflow) begin failures++; $display("overflow flag did not clear"); end
    // drain and check the first words of frame 3 (ratio 1: output = compensated+filtered copy)
    reader_on = 1;
    repeat (1100) @(posedge clk);
    checks++;
    if (!empty || gotq.size() != 1024) begin
      failures++;
      $display("drain: got %0d words", gotq.size());
    end
    gotq.delete();

    // every mechanism must have happened
    checks++; if (n_line_drop == 0) begin failures++; $display("no line dropped"); end
    checks++; if (n_pix_drop == 0) begin failures++; $display("no pixel dropped"); end
    checks++; if (n_edge == 0) begin failures++; $display("no edge replication"); end
    checks++; if (n_limit == 0) begin failures++; $display("limiter never active"); end
    checks++; if (n_full == 0) begin failures++; $display("FIFO never full"); end
    for (int p = 0; p < 32; p++) begin checks++; if (!vphase_seen[p]) begin failures++; $display("v phase %0d unused", p); end end
    for (int p = 0; p < 64; p++) begin checks++; if (!hphase_seen[p]) begin failures++; $display("h phase %0d unused", p); end end
    $display("mechanisms: lines dropped %0d, pixels dropped %0d, edge replications %0d, limiter %0d, full cycles %0d",
             n_line_drop, n_pix_drop, n_edge, n_limit, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
