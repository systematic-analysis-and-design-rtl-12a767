// abs_value_comparator: is |A| above a preset threshold?
//
// Takes a (MAG_W+1)-bit two's-complement sample a = {A3, A2..A0} and an
// unsigned MAG_W-bit threshold thr = {B2..B0} and raises y when the
// magnitude of the sample is strictly greater than the threshold. It is the
// digital analogue of an all-or-nothing threshold detector.
//
// Two stages, as specified:
//   complement_circuit   sign-steered conversion of a to its MAG_W-bit
//                        magnitude (invert-and-add-one written out per bit,
//                        with transmission-gate pairs selecting by A3);
//   magnitude_comparator NAND-NAND comparison of that magnitude with thr.
// The threshold is a primary input; where it is stored is left to the
// surrounding system. The most negative sample (-8 for MAG_W = 3) has no
// MAG_W-bit magnitude and is treated as magnitude 0 (see complement_circuit).
//
// Interface: a, thr in; y out. Purely combinational, no clock or reset:
// y follows the inputs after the gate delay of the two stages.
module abs_value_comparator #(
  parameter int unsigned MAG_W = absval_pkg::MAG_W
) (
  input  logic [MAG_W:0]   a,
  input  logic [MAG_W-1:0] thr,
  output logic             y
);

  logic [MAG_W-1:0] mag;

  complement_circuit #(.MAG_W(MAG_W)) u_complement (
    .a   (a),
    .mag (mag)
  );

  magnitude_comparator #(.MAG_W(MAG_W)) u_compare (
    .a  (mag),
    .b  (thr),
    .gt (y)
  );

endmodule
