// mac_accumulator: accumulation stage of the multiply-accumulate form,
// Z <= Z + X*Y.
//
// A signed PW-bit product is sign-extended by GUARD bits and added to the
// running sum acc on every clock edge with en high.  clr empties the sum; clr
// together with en starts a new sum with the present product.  With en and clr
// low the sum holds.  An active-low asynchronous reset clears it.  The sum
// wraps modulo 2^(PW+GUARD); the GUARD bits let 2^GUARD full-scale products
// be summed before that can happen.  One cycle from en to the updated acc.
//
// The accumulation step itself follows the document; width, guard bits,
// clear/enable and reset are this design's choices.
module mac_accumulator #(
  parameter int unsigned PW    = 128,
  parameter int unsigned GUARD = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic                   clr,
  input  logic [PW-1:0]          product,
  output logic [PW+GUARD-1:0]    acc
);

  logic [PW+GUARD-1:0] prod_x;
  assign prod_x = {{GUARD{product[PW-1]}}, product};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          acc <= '0;
    else if (clr && en)  acc <= prod_x;
    else if (clr)        acc <= '0;
    else if (en)         acc <= acc + prod_x;
  end

endmodule
