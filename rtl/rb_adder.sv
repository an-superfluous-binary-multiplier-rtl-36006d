// rb_adder: W-digit redundant-binary adder (RBA) built from rbfa cells.
//
// Digit i of the sum depends only on digits i and i-1 of the operands, so the
// delay does not grow with W.  The lowest cell sees no transfer and a
// non-negative neighbour; the transfer out of the top digit is dropped, so
// z = x + y modulo 2^W, which is what a 2N-bit two's complement product needs.
// (Lint reports the top cell's transfer and sign outputs as unused: they are
// exactly these dropped bits.)  Where one operand's digit is a constant zero,
// as in the low and high ends of the partial-product rows, synthesis reduces
// the cell to the simpler RB half-adder case.
// Purely combinational.
//
// The document names the RB adder cells it builds on but not their logic; the
// carry-free rule in rbfa is this design's choice.
module rb_adder
  import rbm_pkg::*;
#(
  parameter int unsigned W = 128
) (
  input  rb_digit_t [W-1:0] x,
  input  rb_digit_t [W-1:0] y,
  output rb_digit_t [W-1:0] z
);

  logic [W:0]               nn;   // nn[i]: both digits at position i-1 >= 0
  logic signed [W:0][1:0]   t;    // t[i]: transfer into position i

  assign nn[0] = 1'b1;
  assign t[0]  = 2'sd0;

  for (genvar i = 0; i < W; i++) begin : g_cell
    rbfa u_fa (
      .x         (x[i]),
      .y         (y[i]),
      .lo_nonneg (nn[i]),
      .t_in      (t[i]),
      .nonneg    (nn[i+1]),
      .t_out     (t[i+1]),
      .z         (z[i])
    );
  end

endmodule
