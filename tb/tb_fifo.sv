// tb_fifo: random writes and reads against a queue model; checks data order,
// read latency of one clock, empty/full/count, and that writes into a full
// FIFO and reads from an empty one are ignored.
module tb_fifo;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, dout_valid, empty, full;
  logic [7:0] din = 0, dout;
  logic [4:0] count;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  logic [7:0] q [$];

  fifo #(.WIDTH(8), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 4000; n++) begin
      // bias towards filling, then towards draining
      automatic bit phase = (n / 200) % 2;
      automatic logic w = ($urandom_range(99) < (phase ? 30 : 75));
      automatic logic r = ($urandom_range(99) < (phase ? 75 : 30));
      automatic logic [7:0] d = 8'($urandom);
      automatic logic [7:0] exp_d;
      automatic bit exp_v;
      wr_en <= w; rd_en <= r; din <= d;
      #1;
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH) || count !== 5'(q.size())) begin
        failures++;
        if (failures < 10) $display("n=%0d flags e%0d f%0d c%0d size %0d", n, empty, full, count, q.size());
      end
      if (full) n_full++;
      if (empty) n_empty++;
      exp_v = r && q.size() != 0;
      if (w && q.size() < DEPTH) begin
        if (exp_v) exp_d = q.pop_front();
        q.push_back(d);
      end else if (exp_v) exp_d = q.pop_front();
      @(posedge clk);
      #1;
      checks++;
      if (dout_valid !== exp_v || (exp_v && dout !== exp_d)) begin
        failures++;
        if (failures < 10) $display("n=%0d read v%0d %h expected v%0d %h", n, dout_valid, dout, exp_v, exp_d);
      end
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("full or empty never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
