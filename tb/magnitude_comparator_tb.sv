// magnitude_comparator_tb: exhaustive check of the 3-bit "greater than".
//
// Applies all 64 pairs (a, b) and compares gt with the integer comparison
// a > b. The comparator is combinational: gt is sampled 1 ns after the
// inputs change. Counts at which bit each unequal pair is decided (most
// significant, middle, least significant) plus the equal pairs, and fails
// if any of these cases never occurred. Watchdog as in the other benches.
module magnitude_comparator_tb;
  import absval_pkg::*;

  timeunit 1ns;
  timeprecision 1ps;

  logic clk;
  mag_t a, b;
  logic gt;
  int   checks = 0;
  int   failures = 0;
  int   decided_at [MAG_W];
  int   n_equal = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  magnitude_comparator dut (.a(a), .b(b), .gt(gt));

  initial begin
    foreach (decided_at[k]) decided_at[k] = 0;
    for (int i = 0; i < (1 << MAG_W); i++) begin
      for (int j = 0; j < (1 << MAG_W); j++) begin
        a = mag_t'(i);
        b = mag_t'(j);
        #1;
        checks++;
        if (gt !== (i > j)) begin
          failures++;
          $display("FAIL a=%0d b=%0d gt=%b", i, j, gt);
        end
        if (i == j) n_equal++;
        else begin
          // highest differing bit decides
          for (int k = MAG_W - 1; k >= 0; k--)
            if (a[k] != b[k]) begin
              decided_at[k]++;
              break;
            end
        end
      end
    end
    for (int k = 0; k < MAG_W; k++) begin
      checks++;
      if (decided_at[k] == 0) begin
        failures++;
        $display("FAIL no pair decided at bit %0d", k);
      end
      $display("pairs decided at bit %0d: %0d", k, decided_at[k]);
    end
    checks++;
    if (n_equal == 0) failures++;
    $display("equal pairs: %0d", n_equal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
