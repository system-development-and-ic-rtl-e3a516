// tb_comp_filter: random pixel stream and extreme patterns; each output is
// compared with floor((22*u[n-2] - 2*u[n-1] - 2*u[n-3] - u[n] - u[n-4]) / 16),
// u = pixel - 128, one clock after sample n entered.  Also checks the DC gain
// (flat input gives the same level) and the largest swing fits 9 bits.
module tb_comp_filter;
  import scaler_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] din = 128;
  logic signed [8:0] outcompen;
  int checks = 0, failures = 0;
  int u [$];

  comp_filter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (6) begin din <= 128; @(posedge clk); u.push_front(0); end
    for (int n = 0; n < 3000; n++) begin
      int v, e;
      if (n < 1000)      v = $urandom_range(255);
      else if (n < 1100) v = (n % 2) ? 255 : 0;          // highest frequency
      else if (n < 1200) v = ((n / 3) % 2) ? 255 : 0;
      else if (n < 1300) v = 200;                        // flat
      else               v = $urandom_range(255);
      din <= 8'(v);
      u.push_front(v - 128);
      @(posedge clk);
      #1;
      e = floordiv(22 * u[2] - 2 * u[1] - 2 * u[3] - u[0] - u[4], 16);
      checks++;
      if (outcompen !== 9'(e)) begin
        failures++;
        if (failures < 10) $display("n=%0d: %0d expected %0d", n, outcompen, e);
      end
      if (n == 1299) begin
        checks++;
        if (outcompen != 72) begin failures++; $display("DC gain wrong: %0d", outcompen); end
      end
    end
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
