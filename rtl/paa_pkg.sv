// paa_pkg: sizes and shared types of the self-timed partial-array-of-array
// (PAA) multiplier.
//
// The mantissa multiplier is 24 x 24 bits (IEEE single precision). Each pass
// through the array reduces eight partial products (one 8-bit slice of the
// multiplier), and three passes give the 48-bit product. Those numbers are the
// design's own; the sub-array split 2 + 2 + 4 is the one drawn for the 8-row
// slice. The carry-save pair type bundles the two vectors that travel between
// the stages.
package paa_pkg;
  localparam int unsigned N_BITS     = 24;              // multiplicand / multiplier width
  localparam int unsigned SLICE_BITS = 8;               // multiplier bits reduced per pass
  localparam int unsigned N_ITER     = N_BITS / SLICE_BITS; // passes per multiply (3)
  localparam int unsigned PROD_BITS  = 2 * N_BITS;      // full product (48)
  localparam int unsigned SLICE_PROD = N_BITS + SLICE_BITS; // one pass' product (32)
  localparam int unsigned CPA_HI     = 25;              // high-order CPA width

  // Carry-save pair of a given width: value = sum + carry (mod 2**W).
  typedef struct packed {
    logic [PROD_BITS-1:0] s;
    logic [PROD_BITS-1:0] c;
  } cs48_t;

  typedef struct packed {
    logic [SLICE_PROD-1:0] s;
    logic [SLICE_PROD-1:0] c;
  } cs32_t;
endpackage
