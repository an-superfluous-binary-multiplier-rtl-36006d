// rbmppg: modified redundant-binary partial-product generator.
//
// It turns the N/2 Booth rows of an N x N signed product into N/4 RB rows,
// without the extra error-correction row that earlier RB Booth generators add.
//
// How: NB rows 2k and 2k+1 (weights 4^2k and 4^(2k+1)) form RB row k, whose
// base weight is 2^4k.  Row 2k+1 is the positive vector, shifted two places;
// row 2k is bit-inverted and becomes the negative vector, because
// X + Y = X - ~Y - 1 + 2^(N+1) for an N+1-bit Y.  That leaves three small terms
// per RB row, handled like this:
//   * the negation bit of row 2k goes into the positive vector at the RB row's
//     LSB, which the two-place shift leaves empty;
//   * the negation bit of row 2k+1 (weight 2^(4k+2)) goes into the positive
//     vector of RB row k+1, two places below that row's own LSB, which is
//     empty too;
//   * the -1 of the inversion and the -2^N of each inverted sign bit are
//     constants, summed at elaboration into one constant K.
// Only the top Booth row's negation bit has no empty slot above it.  So the
// correction word is corr = K + neg_top * 2^(N-2): a constant with one
// variable bit, which needs no adder (it is a choice between two constants)
// and which the final converter adds in its carry-save level.  It is never an
// RB row and costs no accumulation level.
//
// Interface: pp[k] is RB row k at its absolute weight, 2N digits wide, so that
// sum_k pp[k] + corr = a * b (mod 2^2N).  Digits outside a row's slots are
// constant zero; the full-width layout keeps the adder tree regular and
// synthesis removes the zero logic.  Purely combinational.
// N must be a multiple of 4.
//
// Pairing two Booth rows by inverting one of them, inverting each row's sign
// bit and removing the separate correction row follow the document; where the
// left-over bits go and the carry-save merge of the correction word are this
// design's own construction.
module rbmppg
  import rbm_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]                    a,
  input  logic [N-1:0]                    b,
  output rb_digit_t [N/4-1:0][2*N-1:0]    pp,
  output logic [2*N-1:0]                  corr
);

  localparam int unsigned W    = 2 * N;
  localparam int unsigned NB   = N / 2;   // Booth (NB) rows
  localparam int unsigned ROWS = N / 4;   // RB rows

  // K = sum_k 2^4k * (-1 - 3 * 2^N) mod 2^W
  function automatic logic [W-1:0] corr_const();
    logic [W-1:0] k_acc;
    logic [W-1:0] term;
    k_acc = '0;
    term  = '0;
    term[N] = 1'b1;
    term  = -(term + (term << 1) + W'(1));      // -1 - 3*2^N
    for (int unsigned k = 0; k < ROWS; k++)
      k_acc = k_acc + (term << (4 * k));
    return k_acc;
  endfunction

  localparam logic [W-1:0] K0 = corr_const();
  localparam logic [W-1:0] K1 = K0 + (W'(1) << (N - 2));

  booth_sel_t [NB-1:0] sel;
  logic [NB-1:0][N:0]  nb_row;
  logic [NB-1:0]       nb_neg;

  mbe_encoder #(.N(N)) u_enc (.b(b), .sel(sel));

  for (genvar j = 0; j < NB; j++) begin : g_nb
    mbe_pp_row #(.N(N)) u_row (
      .a   (a),
      .sel (sel[j]),
      .row (nb_row[j]),
      .neg (nb_neg[j])
    );
  end

  always_comb begin
    for (int unsigned k = 0; k < ROWS; k++) begin
      logic [N:0]   inv_a;
      logic [W-1:0] vp, vm;
      inv_a = ~nb_row[2*k];
      vp = (W'(nb_row[2*k+1]) << (4*k + 2)) | (W'(nb_neg[2*k]) << (4*k));
      if (k > 0) vp = vp | (W'(nb_neg[2*k-1]) << (4*k - 2));
      vm = W'(inv_a) << (4*k);
      for (int unsigned i = 0; i < W; i++) begin
        pp[k][i].p = vp[i];
        pp[k][i].m = vm[i];
      end
    end
  end

  assign corr = nb_neg[NB-1] ? K1 : K0;

endmodule
