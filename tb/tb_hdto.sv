// tb_hdto: drives lines of active samples (with gaps) and compares the
// registered valid-pixel enable and 6-bit select with the output positions
// k * R: sample n is valid when some k has floor((k*R + 32) / 64) == n, with
// select (k*R + 32) mod 64.  Checks 118 outputs for 300 samples at
// R = 2.546875 and one output per sample at R = 1.
module tb_hdto;
  import scaler_pkg::*;
  logic clk = 0, rst_n = 0, de = 0;
  logic [11:0] ratio = 163;
  logic pix_en;
  logic [5:0] sel;
  int checks = 0, failures = 0;

  hdto dut (.*);
  always #5 clk = ~clk;

  task automatic run_line(int r, int w, output int nout);
    int k = 0;
    nout = 0;
    ratio <= 12'(r);
    if (r < 64) r = 64;   // ratios below 1.0 act as 1.0
    for (int n = 0; n < w + 3; n++) begin
      de <= (n < w);
      @(posedge clk);
      #1;
      if (n < w) begin
        int q = k * r + 32;
        bit exp_en = (q >> 6) == n;
        checks++;
        if (pix_en !== exp_en || (exp_en && sel !== 6'(q & 63))) begin
          failures++;
          if (failures < 10) $display("R=%0d n=%0d: en %0d sel %0d, expected %0d %0d", r, n, pix_en, sel, exp_en, q & 63);
        end
        if (exp_en) begin k++; nout++; end
      end else begin
        checks++;
        if (pix_en && n > w) begin failures++; $display("enable outside the line"); end
      end
    end
    de <= 0;
    repeat (5) @(posedge clk);
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_line(163, 300, n);
    checks++;
    if (n != 118) begin failures++; $display("300 samples at 2.546875 gave %0d", n); end
    run_line(64, 50, n);
    checks++;
    if (n != 50) begin failures++; $display("ratio 1 gave %0d", n); end
    run_line(100, 200, n);
    run_line(200, 200, n);
    run_line(3000, 200, n);
    run_line(20, 30, n);
    checks++;
    if (n != 30) begin failures++; $display("ratio below 1 gave %0d outputs for 30 samples", n); end
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
