// tb_vdelay: random inputs; checks that the current line appears two clocks
// later, the 1H line one clock later, the 2H line unchanged, the line/frame
// pulses two clocks later, and that the ok flags (delayed by two clocks) clear
// the active flags of the memory taps.
module tb_vdelay;
  import scaler_pkg::*;
  logic clk = 0, rst_n = 0;
  sample_t cur = '0, d1 = '0, d2 = '0, tap0, tap1, tap2;
  logic ok1 = 0, ok2 = 0, line_start = 0, frame_start = 0, line_start_a, frame_start_a;
  int checks = 0, failures = 0;

  vdelay dut (.*);
  always #5 clk = ~clk;

  typedef struct { sample_t cur, d1, d2; logic ok1, ok2, ls, fs; } in_t;
  in_t h [$];

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 500; n++) begin
      in_t v;
      v.cur = sample_t'($urandom); v.d1 = sample_t'($urandom); v.d2 = sample_t'($urandom);
      v.ok1 = 1'($urandom); v.ok2 = 1'($urandom); v.ls = 1'($urandom); v.fs = 1'($urandom);
      cur <= v.cur; d1 <= v.d1; d2 <= v.d2; ok1 <= v.ok1; ok2 <= v.ok2;
      line_start <= v.ls; frame_start <= v.fs;
      h.push_front(v);
      @(posedge clk);
      #1;
      if (h.size() >= 3) begin
        // h[0] was applied before the edge just passed; outputs now reflect
        // cur/ok/pulses of h[2], d1 of h[1], d2 of h[0]... as seen one clock on
        sample_t e0, e1, e2;
        e0 = h[1].cur;
        e1 = h[0].d1; e1.de = h[0].d1.de & h[1].ok1;
        e2 = d2;      e2.de = d2.de & h[1].ok2;
        checks++;
        if (tap0 !== e0 || tap1 !== e1 || tap2 !== e2 || line_start_a !== h[1].ls || frame_start_a !== h[1].fs) begin
          failures++;
          if (failures < 10) $display("step %0d: taps %h %h %h exp %h %h %h", n, tap0, tap1, tap2, e0, e1, e2);
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
