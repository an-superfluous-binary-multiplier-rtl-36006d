// rb2nb_converter: redundant-binary to normal-binary (two's complement)
// converter with a merged correction word.
//
// An RB number x (positive vector X+, negative vector X-) has the value
// X+ - X- = X+ + ~X- + 1 (mod 2^W).  The correction word corr is added in the
// same pass: one carry-save level (a row of full adders) reduces X+, ~X- and
// corr to a sum and a carry vector, the carry vector's empty LSB takes the +1,
// and a hybrid parallel-prefix / carry-select adder (ppcs_adder) gives
//     p = X+ - X- + corr   (mod 2^W).
// The carry-save carry out of the top bit is discarded (lint reports it as
// unused), which is the modulo-2^W wrap.
// Purely combinational.
//
// Converting with a parallel-prefix / carry-select adder follows the
// document; the carry-save merge of the correction word is this design's
// choice (see rbmppg).
module rb2nb_converter
  import rbm_pkg::*;
#(
  parameter int unsigned W   = 128,
  parameter int unsigned BLK = 4
) (
  input  rb_digit_t [W-1:0] x,
  input  logic [W-1:0]      corr,
  output logic [W-1:0]      p
);

  logic [W-1:0] xp, xmn, cs_s, maj;
  logic [W-1:0] maj_sh;   // carry vector, shifted up; its LSB holds the +1

  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      xp[i]  = x[i].p;
      xmn[i] = ~x[i].m;
    end
    cs_s   = xp ^ xmn ^ corr;
    maj    = (xp & xmn) | (xp & corr) | (xmn & corr);
    maj_sh = {maj[W-2:0], 1'b1};
  end

  ppcs_adder #(.W(W), .BLK(BLK)) u_add (
    .x   (cs_s),
    .y   (maj_sh),
    .cin (1'b0),
    .s   (p)
  );

endmodule
