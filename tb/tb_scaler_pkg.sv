// tb_scaler_pkg: checks the coefficient tables of scaler_pkg.
// Every entry of the 32-phase vertical and 64-phase horizontal tables is
// compared with the floating-point Lagrange reference; every phase must sum
// to 512; the middle phase must be the identity (512 on the centre tap).
module tb_scaler_pkg;
  import scaler_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  initial begin
    for (int p = 0; p < 32; p++) begin
      automatic int sum = 0;
      for (int i = 0; i < 3; i++) begin
        automatic int c = int'($signed(VCOEF[p][i]));
        sum += c;
        checks++;
        if (c != ref_coef(1, 32, p, i)) begin
          failures++;
          $display("VCOEF[%0d][%0d] = %0d, expected %0d", p, i, c, ref_coef(1, 32, p, i));
        end
      end
      checks++;
      if (sum != 512) begin failures++; $display("vertical phase %0d sums to %0d", p, sum); end
    end
    for (int p = 0; p < 64; p++) begin
      automatic int sum = 0;
      for (int i = 0; i < 5; i++) begin
        automatic int c = int'($signed(HCOEF[p][i]));
        sum += c;
        checks++;
        if (c != ref_coef(2, 64, p, i)) begin
          failures++;
          $display("HCOEF[%0d][%0d] = %0d, expected %0d", p, i, c, ref_coef(2, 64, p, i));
        end
      end
      checks++;
      if (sum != 512) begin failures++; $display("horizontal phase %0d sums to %0d", p, sum); end
    end
    checks++;
    if ($signed(HCOEF[32][2]) != 512 || $signed(VCOEF[16][1]) != 512) begin
      failures++; $display("middle phase is not the identity");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
