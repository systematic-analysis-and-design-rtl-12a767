// complement_circuit: two's-complement sample to magnitude.
//
// A sample a = {A3, A2..A0} has sign bit A3. For a positive sample (A3 = 0)
// the magnitude is the value bits as they are. For a negative sample the
// magnitude is the value bits inverted plus one. The add-one is not built
// from an adder: each bit is written out directly from the carry rule, so
// bit i of the negation is A_i xor (A_{i-1} or ... or A_0):
//   Y0 = A0
//   Y1 = A1 xor A0
//   Y2 = A2 xor (A1 or A0)
// Y0 serves both signs (negation leaves the lowest bit unchanged). For every
// higher bit a pair of transmission gates controlled by A3 chooses between
// the negated bit (A3 = 1) and the raw bit (A3 = 0); with MAG_W = 3 these are
// the output nodes called Y1/Y3 (negative path) and Y2/Y4 (positive path).
//
// Y0, Y1 and the selection by A3 follow the specification; the expression
// for Y2 and its generalisation to other widths follow from the same
// add-one rule. The most negative sample (1 followed by zeros, -8 for
// MAG_W = 3) has a magnitude that MAG_W bits cannot hold; the add-one rule
// wraps it to zero and that is what this module returns.
//
// Interface: a (MAG_W+1 bits, two's complement) in, mag (MAG_W bits) out.
// Timing: purely combinational, no clock.
module complement_circuit #(
  parameter int unsigned MAG_W = absval_pkg::MAG_W
) (
  input  logic [MAG_W:0]   a,
  output logic [MAG_W-1:0] mag
);

  logic             sign;
  logic [MAG_W-1:0] neg;     // value bits of the negated sample

  assign sign = a[MAG_W];

  // neg[i] = a[i] xor (a[i-1] or ... or a[0]): the add-one carry reaches
  // bit i of the inverted value exactly when all lower inverted bits are 1.
  always_comb begin
    logic any_low;
    any_low = 1'b0;
    for (int unsigned i = 0; i < MAG_W; i++) begin
      neg[i]  = a[i] ^ any_low;
      any_low = any_low | a[i];
    end
  end

  // Lowest bit: neg[0] = a[0], the same for both signs, so no selector.
  assign mag[0] = neg[0];

  // Higher bits: one transmission-gate pair each, steered by the sign.
  for (genvar i = 1; i < MAG_W; i++) begin : g_sel
    tgate_select u_sel (
      .sel (sign),
      .in0 (a[i]),
      .in1 (neg[i]),
      .out (mag[i])
    );
  end

endmodule
