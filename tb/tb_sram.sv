// tb_sram: random reads and writes against an array model; checks that a read
// returns the old word (read-before-write) one clock later, and that a write
// with we low changes nothing.
module tb_sram;
  localparam int DEPTH = 40, WIDTH = 9;
  logic clk = 0;
  logic [5:0] addr = 0;
  logic we = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] model [DEPTH];
  logic [WIDTH-1:0] expect_q;
  bit have_exp = 0;

  sram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    // fill every word once
    for (int a = 0; a < DEPTH; a++) begin
      addr <= 6'(a); we <= 1; wdata <= WIDTH'($urandom); @(posedge clk);
      model[a] = wdata;
    end
    we <= 0;
    for (int n = 0; n < 2000; n++) begin
      automatic int a = $urandom_range(DEPTH - 1);
      automatic logic w = 1'($urandom);
      automatic logic [WIDTH-1:0] d = WIDTH'($urandom);
      addr <= 6'(a); we <= w; wdata <= d;
      @(posedge clk);
      expect_q = model[a];
      if (w) model[a] = d;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        if (failures < 10) $display("addr %0d: read %h expected %h", a, rdata, expect_q);
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
