// rbfa: redundant-binary full-adder digit cell (carry-free RB addition).
//
// Two RB digits x, y in {-1,0,1} give s = x + y in [-2,2], which is split into
// a transfer t_out and an interim digit w with s = 2*t_out + w.  The split for
// s = +-1 depends on the position below: if both of its digits are
// non-negative (lo_nonneg) its transfer can only be 0 or +1, so w is made -1;
// otherwise its transfer can only be 0 or -1, so w is made +1.  The sum digit
// z = w + t_in then always lies in {-1,0,1}, and no carry ever travels more
// than one position.  nonneg reports this position's own condition upward.
// Purely combinational.
//
// The document only names the RB full adder it uses; this is the classic
// two-step carry-free rule, chosen here.
module rbfa
  import rbm_pkg::*;
(
  input  rb_digit_t         x,
  input  rb_digit_t         y,
  input  logic              lo_nonneg,
  input  logic signed [1:0] t_in,
  output logic              nonneg,
  output logic signed [1:0] t_out,
  output rb_digit_t         z
);

  logic signed [2:0] s, w, zv;

  always_comb begin
    s = 3'(signed'({1'b0, x.p})) - 3'(signed'({1'b0, x.m}))
      + 3'(signed'({1'b0, y.p})) - 3'(signed'({1'b0, y.m}));
    nonneg = ~(x.m & ~x.p) & ~(y.m & ~y.p);
    unique case (s)
      3'sd2:   begin t_out = 2'sd1;  w = 3'sd0;  end
      3'sd1:   if (lo_nonneg) begin t_out = 2'sd1;  w = -3'sd1; end
               else           begin t_out = 2'sd0;  w = 3'sd1;  end
      -3'sd1:  if (lo_nonneg) begin t_out = 2'sd0;  w = -3'sd1; end
               else           begin t_out = -2'sd1; w = 3'sd1;  end
      -3'sd2:  begin t_out = -2'sd1; w = 3'sd0;  end
      default: begin t_out = 2'sd0;  w = 3'sd0;  end
    endcase
    zv  = w + 3'(t_in);
    z.p = (zv == 3'sd1);
    z.m = (zv == -3'sd1);
  end

endmodule
