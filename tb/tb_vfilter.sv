// tb_vfilter: random column samples, selects and active flags; each output is
// compared one clock later with sum(c*x) over the three taps (reference
// coefficients), edge replication for inactive outer taps, limiting to
// 0..255 after /512, and BLANK_LEVEL for an inactive centre.  Every select
// value and the limiter at both ends are exercised.
module tb_vfilter;
  import scaler_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, line_en = 0, line_en_out;
  sample_t tap0 = '0, tap1 = '0, tap2 = '0, dout;
  logic [4:0] sel = 0;
  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;

  vfilter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 4000; n++) begin
      sample_t t0, t1, t2;
      int p0, p2, s, e;
      logic [4:0] sv;
      logic le;
      t0 = sample_t'($urandom); t1 = sample_t'($urandom); t2 = sample_t'($urandom);
      if (n % 4 == 0) begin t0.pix = 255; t1.pix = 0; t2.pix = 255; end   // undershoot
      if (n % 4 == 1) begin t0.pix = 0; t1.pix = 255; t2.pix = 0; end     // overshoot
      t1.de = (n % 7 != 0);
      sv = 5'(n % 32); le = 1'($urandom);
      tap0 <= t0; tap1 <= t1; tap2 <= t2; sel <= sv; line_en <= le;
      @(posedge clk);
      #1;
      p0 = t0.de ? t0.pix : t1.pix;
      p2 = t2.de ? t2.pix : t1.pix;
      s = ref_coef(1, 32, sv, 0) * p0 + ref_coef(1, 32, sv, 1) * t1.pix + ref_coef(1, 32, sv, 2) * p2;
      if (s < 0) begin s = 0; n_lo++; end
      if (s > 255 * 512 + 511) begin s = 255 * 512 + 511; n_hi++; end
      e = t1.de ? (s >> 9) : BLANK_LEVEL;
      checks++;
      if (dout.pix !== 8'(e) || dout.de !== t1.de || line_en_out !== le) begin
        failures++;
        if (failures < 10) $display("n=%0d sel=%0d: %0d expected %0d", n, sv, dout.pix, e);
      end
    end
    checks++;
    if (n_lo == 0 || n_hi == 0) begin failures++; $display("limiter not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
