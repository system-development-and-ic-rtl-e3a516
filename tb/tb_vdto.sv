// tb_vdto: runs frames of line starts with several ratios and compares the
// valid-line enable and 5-bit select held for each line with the output-line
// positions k * R computed directly: the line whose centre is m is valid when
// some k has floor((k*R + 32) / 64) == m, with select ((k*R + 32) mod 64) / 2.
// Also checks the number of output lines of a 300-line frame at R = 2.546875
// (118) and that nothing is valid before the first frame.
module tb_vdto;
  import scaler_pkg::*;
  logic clk = 0, rst_n = 0, line_start = 0, frame_start = 0;
  logic [11:0] ratio = 163;
  logic line_en;
  logic [4:0] sel;
  int checks = 0, failures = 0;

  vdto dut (.*);
  always #5 clk = ~clk;

  task automatic run_frame(int r, int nlines, int blank_after, output int nout);
    int k = 0;
    nout = 0;
    ratio <= 12'(r);
    for (int l = 0; l < nlines + blank_after; l++) begin
      line_start <= 1; frame_start <= (l == 0);
      @(posedge clk);
      line_start <= 0; frame_start <= 0;
      @(posedge clk);
      #1;
      // during input line l the centre line is l-1
      if (l >= 1) begin
        int m = l - 1;
        int q = k * r + 32;
        bit exp_en = (q >> 6) == m;
        checks++;
        if (line_en !== exp_en || (exp_en && sel !== 5'((q & 63) >> 1))) begin
          failures++;
          if (failures < 10) $display("R=%0d line %0d: en %0d sel %0d, expected %0d sel %0d", r, m, line_en, sel, exp_en, (q & 63) >> 1);
        end
        if (exp_en) begin
          k++;
          if (m < nlines) nout++;
        end
      end
      repeat (3) @(posedge clk);
    end
  endtask

  initial begin
    int n;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // lines before any frame: nothing valid
    repeat (3) begin
      line_start <= 1; @(posedge clk); line_start <= 0; @(posedge clk); #1;
      checks++;
      if (line_en) begin failures++; $display("valid line before first frame"); end
    end
    run_frame(163, 300, 2, n);
    checks++;
    if (n != 118) begin failures++; $display("300 lines at 2.546875 gave %0d lines", n); end
    run_frame(64, 20, 2, n);
    checks++;
    if (n != 20) begin failures++; $display("ratio 1 gave %0d lines", n); end
    run_frame(100, 40, 2, n);
    run_frame(4095, 100, 2, n);
    run_frame(77, 50, 2, n);
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
