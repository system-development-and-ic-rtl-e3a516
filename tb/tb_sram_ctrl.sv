// tb_sram_ctrl: drives lines of several lengths and checks the address
// counter (0 on line_start, +1 per clock, saturating at DEPTH-1), the one-clock
// delayed second address, the constant write enable and the ok1/ok2 flags
// (after one and two complete lines).
module tb_sram_ctrl;
  localparam int DEPTH = 50;
  logic clk = 0, rst_n = 0, line_start = 0;
  logic [5:0] addr1, addr2;
  logic we, ok1, ok2;
  int checks = 0, failures = 0;

  sram_ctrl #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("%s", msg); end
  endtask

  initial begin
    int exp_a, prev_a, lines;
    int lens [5] = '{30, 45, 60, 20, 50};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    prev_a = 0;
    lines = 0;
    foreach (lens[i]) begin
      for (int c = 0; c < lens[i]; c++) begin
        line_start <= (c == 0);
        #1;
        if (c == 0) lines = (lines < 3) ? lines + 1 : 3;
        exp_a = (c < DEPTH) ? c : DEPTH - 1;
        chk(addr1 == 6'(exp_a), $sformatf("line %0d col %0d addr1 %0d", i, c, addr1));
        chk(addr2 == 6'(prev_a), $sformatf("line %0d col %0d addr2 %0d exp %0d", i, c, addr2, prev_a));
        chk(we, "we low");
        chk(ok1 == (lines >= 2) && ok2 == (lines >= 3), $sformatf("ok flags %0d %0d after %0d lines", ok1, ok2, lines));
        prev_a = exp_a;
        @(posedge clk);
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
