// tb_time_align: random enables and selects; checks {pixel enable, select}
// come out exactly 4 clocks later and the line enable 6 clocks later.
module tb_time_align;
  import scaler_pkg::*;
  logic clk = 0, rst_n = 0, pix_en = 0, line_en = 0, pix_en_a, line_en_a;
  logic [5:0] sel_h = 0, sel_h_a;
  int checks = 0, failures = 0;
  logic [6:0] hp [$];
  logic hl [$];

  time_align dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 1000; n++) begin
      automatic logic [6:0] v = 7'($urandom);
      automatic logic l = 1'($urandom);
      pix_en <= v[6]; sel_h <= v[5:0]; line_en <= l;
      hp.push_front(v); hl.push_front(l);
      @(posedge clk);
      #1;
      if (n >= 6) begin
        checks++;
        if ({pix_en_a, sel_h_a} !== hp[3] || line_en_a !== hl[5]) begin
          failures++;
          if (failures < 10) $display("n=%0d: %h %0d expected %h %0d", n, {pix_en_a, sel_h_a}, line_en_a, hp[3], hl[5]);
        end
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
