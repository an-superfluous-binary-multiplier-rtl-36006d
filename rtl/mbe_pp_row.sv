// mbe_pp_row: one normal-binary (NB) partial-product row of the Booth
// multiplier.
//
// From the multiplicand a and one Booth select it forms the N+1-bit multiple
// 0, A or 2A (2A by a one-bit left shift, A sign-extended by one bit), inverts
// every bit when the digit is negative (one's complement) and then inverts the
// sign bit.  The +1 that completes the two's complement negation is not added
// here: it leaves as the separate neg bit, to be placed in a spare slot later.
// With U() the unsigned value of the row,
//     d * A = U(row) + neg - 2^N.
// The constant -2^N, the price of the inverted sign bit, is collected for all
// rows in the correction constant.  Purely combinational.
//
// Selecting A/2A, negating by inversion plus a separate 1, and inverting each
// row's sign bit follow the document; the port layout is this design's.
module mbe_pp_row
  import rbm_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0] a,
  input  booth_sel_t   sel,
  output logic [N:0]   row,
  output logic         neg
);

  logic [N:0] mag;  // |d| * A as an N+1-bit two's complement number
  logic [N:0] q;    // d * A - neg, two's complement

  always_comb begin
    mag = '0;
    if (sel.one) mag = {a[N-1], a};
    if (sel.two) mag = {a, 1'b0};
    q   = sel.neg ? ~mag : mag;
    row = {~q[N], q[N-1:0]};
  end

  assign neg = sel.neg;

endmodule
