// tb_hfilter: random 9-bit signed stream with random selects; checks each
// output against sum over five taps of c[sel][i] * x[n-i] (reference
// coefficients), limited to the 8-bit signed range after /512 (floor) and
// offset by +128, and that `valid` is `en` one clock later.  All 64 selects
// and both limiter ends are exercised.
module tb_hfilter;
  import scaler_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, valid;
  logic signed [8:0] outcompen = 0;
  logic [5:0] sel_h = 0;
  logic [7:0] data_outh;
  int checks = 0, failures = 0, n_lo = 0, n_hi = 0;
  int x [$];

  hfilter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) begin outcompen <= 0; @(posedge clk); x.push_front(0); end
    for (int n = 0; n < 5000; n++) begin
      int v, s, e;
      logic [5:0] sv;
      logic ev;
      if ((n / 8) % 3 == 0)      v = ((n % 2) ? 255 : -256);
      else if ((n / 8) % 3 == 1) v = ((n % 5) < 2) ? -256 : 255;
      else                       v = $urandom_range(511) - 256;
      sv = 6'($urandom); ev = 1'($urandom);
      if (n < 64) sv = 6'(n);
      outcompen <= 9'(v); sel_h <= sv; en <= ev;
      x.push_front(v);
      @(posedge clk);
      #1;
      s = 0;
      for (int i = 0; i < 5; i++) s += ref_coef(2, 64, sv, i) * x[i];
      if (s > 127 * 512 + 511) begin s = 127 * 512 + 511; n_hi++; end
      if (s < -128 * 512) begin s = -128 * 512; n_lo++; end
      e = floordiv(s, 512) + 128;
      checks++;
      if (data_outh !== 8'(e) || valid !== ev) begin
        failures++;
        if (failures < 10) $display("n=%0d sel=%0d: %0d expected %0d", n, sv, data_outh, e);
      end
    end
    checks++;
    if (n_lo == 0 || n_hi == 0) begin failures++; $display("limiter not exercised (%0d %0d)", n_lo, n_hi); end
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
