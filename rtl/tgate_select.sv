// tgate_select: one pair of transmission gates sharing an output node.
//
// In the complement circuit each magnitude bit is taken from one of two
// candidate nodes through a pair of CMOS transmission gates whose controls
// are complementary, so exactly one gate conducts at any time. Seen from the
// logic level the pair is a two-input selector: `sel` = 1 turns on the gate
// carrying `in1`, `sel` = 0 the gate carrying `in0`. Modelling the pair as a
// selector, rather than as bidirectional switches, is this design's choice:
// it is what a synthesis flow or a standard-cell library can take.
// Purely combinational.
module tgate_select (
  input  logic sel,   // gate control (the sign bit A3 in this design)
  input  logic in0,   // node passed when sel = 0
  input  logic in1,   // node passed when sel = 1
  output logic out    // shared output node
);

  always_comb out = sel ? in1 : in0;

endmodule
