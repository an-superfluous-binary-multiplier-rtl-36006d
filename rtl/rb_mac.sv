// rb_mac: multiply-accumulate unit built on the redundant-binary Booth
// multiplier.
//
// The combinational rb_multiplier forms product = a * b (2N-bit, signed); the
// mac_accumulator adds it to the running sum acc on a clock edge with acc_en,
// clears the sum with acc_clr, or restarts it with the present product when
// both are high.  product is valid in the same cycle as a and b; acc shows the
// new sum one clock later.  Reset is asynchronous, active low.
//
// The four steps (Booth encoding, partial-product summation, final addition,
// accumulation) follow the document's multiply-accumulate description; the
// control signals and the GUARD width are this design's choices.
module rb_mac #(
  parameter int unsigned N     = 64,
  parameter int unsigned GUARD = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N-1:0]           a,
  input  logic [N-1:0]           b,
  input  logic                   acc_en,
  input  logic                   acc_clr,
  output logic [2*N-1:0]         product,
  output logic [2*N+GUARD-1:0]   acc
);

  rb_multiplier #(.N(N)) u_mul (
    .a (a),
    .b (b),
    .p (product)
  );

  mac_accumulator #(.PW(2*N), .GUARD(GUARD)) u_acc (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (acc_en),
    .clr     (acc_clr),
    .product (product),
    .acc     (acc)
  );

endmodule
