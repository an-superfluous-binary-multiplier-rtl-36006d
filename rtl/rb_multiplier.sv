// rb_multiplier: N x N signed redundant-binary Booth multiplier with the
// modified partial-product generator.
//
// Data flow, all combinational:
//   1. mbe_encoder   radix-4 Booth digits of b (inside rbmppg);
//   2. rbmppg        N/2 Booth rows paired into N/4 RB rows, plus a correction
//                    word that is a constant with one variable bit;
//   3. rbpp_tree     carry-free RB adder tree, log2(N/4) levels;
//   4. rb2nb_converter  RB sum plus correction word to two's complement with
//                    one carry-save level and a prefix / carry-select adder.
// p = a * b exactly, as a 2N-bit two's complement number.  N must be a
// multiple of 4; the tree is balanced when N/4 is a power of two.
//
// The stage order, the Booth encoding, the RB pairing and the absence of an
// extra correction row follow the document; it reports its proposed design
// without a clocked path, so no registers are used here.
module rb_multiplier
  import rbm_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned W    = 2 * N;
  localparam int unsigned ROWS = N / 4;

  rb_digit_t [ROWS-1:0][W-1:0] pp;
  rb_digit_t [W-1:0]           rb_sum;
  logic [W-1:0]                corr;

  rbmppg #(.N(N)) u_ppg (
    .a    (a),
    .b    (b),
    .pp   (pp),
    .corr (corr)
  );

  rbpp_tree #(.W(W), .ROWS(ROWS)) u_tree (
    .pp  (pp),
    .sum (rb_sum)
  );

  rb2nb_converter #(.W(W), .BLK(4)) u_conv (
    .x    (rb_sum),
    .corr (corr),
    .p    (p)
  );

endmodule
