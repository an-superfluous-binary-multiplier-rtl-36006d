// ppcs_adder: hybrid parallel-prefix / carry-select adder, s = x + y + cin
// modulo 2^W.
//
// The word is cut into groups of BLK bits.  Each group computes a generate and
// a propagate signal; a Kogge-Stone prefix tree over the groups gives the
// carry into every group in log2(W/BLK) steps.  Meanwhile each group forms
// two ripple sums, one for carry-in 0 and one for carry-in 1, and the prefix
// carry selects between them.  Purely combinational.  W must be a multiple of
// BLK.
//
// The document names this adder family for its RB-to-NB conversion; the group
// size and the Kogge-Stone prefix are this design's choice.
module ppcs_adder #(
  parameter int unsigned W   = 128,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] s
);

  localparam int unsigned NG = W / BLK;

  function automatic int unsigned clog2u(int unsigned v);
    int unsigned r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  localparam int unsigned STEPS = clog2u(NG);

  logic [NG-1:0]         gg, gp;    // group generate / propagate
  logic [NG-1:0][BLK-1:0] s0, s1;   // group sums for carry-in 0 / 1
  logic [STEPS:0][NG-1:0] pg, pp;   // prefix tree
  logic [NG-1:0]         gc;        // carry into group

  always_comb begin
    for (int unsigned g = 0; g < NG; g++) begin
      logic c0, c1, gen, prop;
      c0   = 1'b0;
      c1   = 1'b1;
      gen  = 1'b0;
      prop = 1'b1;
      for (int unsigned i = 0; i < BLK; i++) begin
        logic xi, yi;
        xi = x[g*BLK + i];
        yi = y[g*BLK + i];
        s0[g][i] = xi ^ yi ^ c0;
        s1[g][i] = xi ^ yi ^ c1;
        c0   = (xi & yi) | ((xi ^ yi) & c0);
        c1   = (xi & yi) | ((xi ^ yi) & c1);
        gen  = (xi & yi) | ((xi ^ yi) & gen);
        prop = prop & (xi ^ yi);
      end
      gg[g] = gen;
      gp[g] = prop;
    end
  end

  // Kogge-Stone prefix over the groups; after the last step pg[STEPS][g] is
  // the carry out of groups 0..g with no carry-in, pp[STEPS][g] their joint
  // propagate.
  assign pg[0] = gg;
  assign pp[0] = gp;
  for (genvar st = 0; st < STEPS; st++) begin : g_step
    for (genvar g = 0; g < NG; g++) begin : g_node
      if (g >= (1 << st)) begin : g_comb
        assign pg[st+1][g] = pg[st][g] | (pp[st][g] & pg[st][g - (1 << st)]);
        assign pp[st+1][g] = pp[st][g] & pp[st][g - (1 << st)];
      end else begin : g_copy
        assign pg[st+1][g] = pg[st][g];
        assign pp[st+1][g] = pp[st][g];
      end
    end
  end

  assign gc[0] = cin;
  for (genvar g = 1; g < NG; g++) begin : g_carry
    assign gc[g] = pg[STEPS][g-1] | (pp[STEPS][g-1] & cin);
  end
  for (genvar g = 0; g < NG; g++) begin : g_sel
    assign s[g*BLK +: BLK] = gc[g] ? s1[g] : s0[g];
  end

endmodule
