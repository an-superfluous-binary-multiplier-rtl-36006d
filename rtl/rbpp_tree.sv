// rbpp_tree: redundant-binary partial-product accumulator.
//
// A balanced binary tree of rb_adder rows reduces ROWS RB numbers to one.  At
// every level rows 2i and 2i+1 are added; an odd last row passes straight to
// the next level.  The depth is ceil(log2(ROWS)) RB adder delays, each
// independent of the word width because RB addition is carry-free.  With the
// N/4 rows of the modified generator that is log2(N/4) levels for
// N = 8, 16, 32, 64 (1, 2, 3, 4 levels).  Purely combinational.
//
// Accumulating the RB rows with RB adders follows the document; the pairwise
// tree shape is this design's choice.
module rbpp_tree
  import rbm_pkg::*;
#(
  parameter int unsigned W    = 128,
  parameter int unsigned ROWS = 16
) (
  input  rb_digit_t [ROWS-1:0][W-1:0] pp,
  output rb_digit_t [W-1:0]           sum
);

  function automatic int unsigned n_levels(int unsigned r);
    int unsigned l = 0;
    while (r > 1) begin
      r = (r + 1) / 2;
      l++;
    end
    return l;
  endfunction

  function automatic int unsigned rows_at(int unsigned r, int unsigned lvl);
    for (int unsigned i = 0; i < lvl; i++) r = (r + 1) / 2;
    return r;
  endfunction

  localparam int unsigned LEVELS = n_levels(ROWS);

  rb_digit_t [LEVELS:0][ROWS-1:0][W-1:0] lv;

  assign lv[0] = pp;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned RIN  = rows_at(ROWS, l - 1);
    localparam int unsigned ROUT = rows_at(ROWS, l);
    for (genvar i = 0; i < ROUT; i++) begin : g_row
      if (2 * i + 1 < RIN) begin : g_add
        rb_adder #(.W(W)) u_rba (
          .x (lv[l-1][2*i]),
          .y (lv[l-1][2*i+1]),
          .z (lv[l][i])
        );
      end else begin : g_pass
        assign lv[l][i] = lv[l-1][2*i];
      end
    end
    for (genvar i = ROUT; i < ROWS; i++) begin : g_unused
      assign lv[l][i] = '0;
    end
  end

  assign sum = lv[LEVELS][0];

endmodule
