// rbm_pkg: types shared by the redundant-binary (RB) Booth multiplier.
//
// booth_sel_t is the select bundle one radix-4 modified Booth digit drives into
// its partial-product row: neg (the digit is negative), one (|d| = 1) and two
// (|d| = 2).  A zero digit has all three low.
//
// rb_digit_t is one redundant-binary digit coded as a pair of ordinary bits,
// value = p - m, so (0,0) and (1,1) are 0, (1,0) is +1 and (0,1) is -1.  An RB
// number of W digits is a packed array rb_digit_t [W-1:0]; it is the same as a
// positive bit vector X+ and a negative bit vector X- with value X+ - X-.
// This two-bit coding follows the document's RB encoding table; the type
// names are this design's own.
package rbm_pkg;

  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_sel_t;

  typedef struct packed {
    logic p;
    logic m;
  } rb_digit_t;

endpackage
