// magnitude_comparator: unsigned "greater than" in NAND-NAND form.
//
// gt = 1 exactly when a > b, both unsigned MAG_W-bit numbers. The bits are
// compared from the most significant down: a wins at bit i when a_i = 1,
// b_i = 0 and no higher bit has already decided. For MAG_W = 3 the
// sum-of-products is
//   Y = A2 B2' + (A2 == B2) A1 B1' + (A2 == B2)(A1 == B1) A0 B0'.
// The equality factors need XNOR gates, which cost more transistors than
// NANDs. Because an earlier product already covers the case "a_j = 1,
// b_j = 0", each equality factor can be replaced by "not (a_j = 0 and
// b_j = 1)", which is a single NAND of a_j' and b_j. Every product then is a
// NAND of plain and inverted inputs, and the OR of the products is a NAND of
// those NANDs:
//   Y = NAND( NAND(A2, B2'),
//             NAND(k2, A1, B1'),
//             NAND(k2, k1, A0, B0') ),   k_j = NAND(A_j', B_j).
// The sum-of-products and the removal of the XNORs follow the
// specification; writing the rewritten factor as NAND(A_j', B_j) and the
// generalisation to other widths are this design's reading of it.
//
// Interface: a, b (MAG_W bits each) in, gt out. Purely combinational.
module magnitude_comparator #(
  parameter int unsigned MAG_W = absval_pkg::MAG_W
) (
  input  logic [MAG_W-1:0] a,
  input  logic [MAG_W-1:0] b,
  output logic             gt
);

  logic [MAG_W-1:0] keep;  // keep[j]  = NAND(a_j', b_j): bit j does not favour b
  logic [MAG_W-1:0] win_n; // win_n[i] = NAND of a_i, b_i' and keep of all higher bits

  always_comb begin
    for (int unsigned j = 0; j < MAG_W; j++)
      keep[j] = ~(~a[j] & b[j]);

    for (int unsigned i = 0; i < MAG_W; i++) begin
      logic term;
      term = a[i] & ~b[i];
      for (int unsigned j = i + 1; j < MAG_W; j++)
        term = term & keep[j];
      win_n[i] = ~term;
    end

    // Output NAND: 1 when any product term is true.
    gt = ~(&win_n);
  end

endmodule
