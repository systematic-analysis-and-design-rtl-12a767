// complement_circuit_tb: exhaustive check of the sign-to-magnitude stage.
//
// Applies every 4-bit two's-complement sample and compares the 3-bit
// magnitude with one computed by integer arithmetic (|value| mod 8, so the
// most negative sample -8 is expected to wrap to 0). The stage is
// combinational: each output is sampled 1 ns after the inputs change, with
// no clock edge in between. Also counts how many samples took the positive
// and the negative path so that both transmission-gate settings are seen.
// A watchdog on a free-running clock ends the run if it ever hangs.
module complement_circuit_tb;
  import absval_pkg::*;

  timeunit 1ns;
  timeprecision 1ps;

  logic    clk;
  sample_t a;
  mag_t    mag;
  int      checks = 0;
  int      failures = 0;
  int      n_pos = 0;
  int      n_neg = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  complement_circuit dut (.a(a), .mag(mag));

  // Reference: signed value, absolute value, keep MAG_W bits.
  function automatic mag_t ref_mag(sample_t s);
    int v;
    v = int'($signed(s));
    if (v < 0) v = -v;
    return mag_t'(v);
  endfunction

  initial begin
    for (int i = 0; i < (1 << IN_W); i++) begin
      a = sample_t'(i);
      #1;
      checks++;
      if (mag !== ref_mag(a)) begin
        failures++;
        $display("FAIL a=%b (%0d): mag=%0d expected %0d", a, $signed(a), mag, ref_mag(a));
      end
      if (a[IN_W-1]) n_neg++; else n_pos++;
    end
    // Both settings of the transmission-gate pairs must have been used.
    checks++;
    if (n_pos != (1 << MAG_W) || n_neg != (1 << MAG_W)) begin
      failures++;
      $display("FAIL path counts pos=%0d neg=%0d", n_pos, n_neg);
    end
    $display("positive samples=%0d negative samples=%0d", n_pos, n_neg);
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
