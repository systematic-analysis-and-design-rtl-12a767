// abs_value_comparator_tb: end-to-end check of the absolute value comparator.
//
// Runs the design at its default size (4-bit sample, 3-bit threshold) over
// every sample and every threshold, 128 cases, and compares y with
// (|sample| mod 8) > threshold worked out by integer arithmetic. The design
// is combinational: y is sampled 1 ns after the inputs change.
//
// Counts each mechanism of the design and fails if one never happened:
// positive path (sign 0, value bits passed straight), negative path (sign 1,
// negated bits selected), the most negative sample wrapping to magnitude 0,
// an output of 1 (above threshold) and of 0 (at or below), a decision made
// at each comparator bit, and an equal magnitude and threshold.
// A watchdog on a free-running clock ends the run if it ever hangs.
module abs_value_comparator_tb;
  import absval_pkg::*;

  timeunit 1ns;
  timeprecision 1ps;

  logic    clk;
  sample_t a;
  mag_t    thr;
  logic    y;
  int      checks = 0;
  int      failures = 0;

  int n_pos = 0, n_neg = 0, n_wrap = 0, n_above = 0, n_below = 0, n_equal = 0;
  int decided_at [MAG_W];

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  abs_value_comparator dut (.a(a), .thr(thr), .y(y));

  function automatic mag_t ref_mag(sample_t s);
    int v;
    v = int'($signed(s));
    if (v < 0) v = -v;
    return mag_t'(v);
  endfunction

  task automatic count(string name, int n);
    checks++;
    $display("%-28s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end
  endtask

  initial begin
    foreach (decided_at[k]) decided_at[k] = 0;
    for (int i = 0; i < (1 << IN_W); i++) begin
      for (int t = 0; t < (1 << MAG_W); t++) begin
        mag_t m;
        logic expect_y;
        a   = sample_t'(i);
        thr = mag_t'(t);
        m   = ref_mag(a);
        expect_y = (m > thr);
        #1;
        checks++;
        if (y !== expect_y) begin
          failures++;
          $display("FAIL a=%b (%0d) thr=%0d: y=%b expected %b",
                   a, $signed(a), thr, y, expect_y);
        end
        if (a[IN_W-1]) n_neg++; else n_pos++;
        if (a == sample_t'(1 << MAG_W)) n_wrap++;
        if (expect_y) n_above++; else n_below++;
        if (m == thr) n_equal++;
        else
          for (int k = MAG_W - 1; k >= 0; k--)
            if (m[k] != thr[k]) begin
              decided_at[k]++;
              break;
            end
      end
    end
    count("positive path", n_pos);
    count("negative path", n_neg);
    count("most negative wraps", n_wrap);
    count("above threshold (y=1)", n_above);
    count("not above (y=0)", n_below);
    count("magnitude equals threshold", n_equal);
    for (int k = MAG_W - 1; k >= 0; k--)
      count($sformatf("decided at bit %0d", k), decided_at[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
