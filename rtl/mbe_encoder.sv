// mbe_encoder: radix-4 modified Booth encoder for an N-bit two's complement
// multiplier.
//
// The multiplier b is cut into N/2 overlapping groups (b[2j+1], b[2j], b[2j-1]),
// with a 0 as the reference bit below b[0].  Each group selects the digit
// d_j = -2*b[2j+1] + b[2j] + b[2j-1] in {-2,-1,0,1,2}, so that
// b = sum_j d_j * 4^j.  The digit leaves the encoder as three select lines:
// one (|d|=1), two (|d|=2) and neg (d<0).  The group 111 (minus zero) is
// encoded as plain zero.  Purely combinational; N must be even.
//
// The grouping and digit set follow the document's Booth table; the one/two/neg
// select coding is the usual one and is this design's choice.
module mbe_encoder
  import rbm_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]         b,
  output booth_sel_t [N/2-1:0] sel
);

  logic [N:0] bx;  // b with the reference 0 appended below bit 0
  assign bx = {b, 1'b0};

  always_comb begin
    for (int j = 0; j < N/2; j++) begin
      logic hi, mid, lo;
      hi  = bx[2*j+2];
      mid = bx[2*j+1];
      lo  = bx[2*j];
      sel[j].one = mid ^ lo;
      sel[j].two = (hi & ~mid & ~lo) | (~hi & mid & lo);
      sel[j].neg = hi & ~(mid & lo);
    end
  end

endmodule
