// absval_pkg: widths shared by the absolute value comparator.
//
// The comparator takes a four-bit two's-complement sample (sign bit plus
// three value bits) and a three-bit unsigned threshold. MAG_W is the number
// of value bits; the sample is MAG_W+1 bits wide. Both numbers are the ones
// the design is specified for; the modules are written for any MAG_W >= 1.
package absval_pkg;

  // Value bits of the sample and width of the threshold.
  localparam int unsigned MAG_W = 3;
  // Width of the two's-complement sample, sign included.
  localparam int unsigned IN_W  = MAG_W + 1;

  typedef logic [MAG_W-1:0] mag_t;
  typedef logic [IN_W-1:0]  sample_t;

endpackage
