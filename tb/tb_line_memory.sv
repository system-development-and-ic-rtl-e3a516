// tb_line_memory: streams random lines of a fixed period through the two
// 1H delays and checks that d1 is the sample of the same column one line
// earlier (read in the clock the new sample is written, so visible one clock
// later) and d2, from the second memory whose address lags by one clock, the
// sample two lines earlier one column behind.
module tb_line_memory;
  import scaler_pkg::*;
  localparam int DEPTH = 64, LP = 37, NL = 8;
  logic clk = 0, rst_n = 0, line_start = 0;
  sample_t din = '0, d1, d2;
  logic ok1, ok2;
  int checks = 0, failures = 0;
  sample_t hist [NL][LP];

  line_memory #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int l = 0; l < NL; l++)
      for (int c = 0; c < LP; c++) begin
        hist[l][c] = sample_t'($urandom);
        line_start <= (c == 0);
        din <= hist[l][c];
        @(posedge clk);
        #1;
        // d1 now shows the read made in the previous clock
        if (l >= 1) begin
          checks++;
          if (d1 !== hist[l-1][c]) begin failures++; if (failures < 10) $display("d1 l%0d c%0d", l, c); end
        end
        if (l >= 2 && c >= 1) begin
          checks++;
          if (d2 !== hist[l-2][c-1]) begin failures++; if (failures < 10) $display("d2 l%0d c%0d", l, c); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
