// tb_fifo_ctrl: all input combinations in random order; checks that a write
// happens only with both enables and room in the FIFO, and the sticky
// overflow flag (set by a wanted write into a full FIFO, cleared by clr_ovf).
module tb_fifo_ctrl;
  logic clk = 0, rst_n = 0, pix_en = 0, line_en = 0, full = 0, clr_ovf = 0, wr_en, overflow;
  int checks = 0, failures = 0;
  bit ovf_model = 0;

  fifo_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 500; n++) begin
      automatic logic [3:0] v = 4'($urandom);
      if (v[3] && n % 3 != 0) v[3] = 0;  // clear less often than set
      pix_en <= v[0]; line_en <= v[1]; full <= v[2]; clr_ovf <= v[3];
      #1;
      checks++;
      if (wr_en !== (v[0] & v[1] & !v[2])) begin failures++; $display("n=%0d wr_en %0d", n, wr_en); end
      @(posedge clk);
      if (v[0] & v[1] & v[2]) ovf_model = 1;
      else if (v[3]) ovf_model = 0;
      #1;
      checks++;
      if (overflow !== ovf_model) begin failures++; $display("n=%0d overflow %0d expected %0d", n, overflow, ovf_model); end
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
