// tb_mbe_pp_row: checks one Booth partial-product row at N = 16.  For random
// and extreme multiplicands and every Booth digit it checks
// U(row) + neg - 2^N == d * a, computed with plain integer arithmetic.
module tb_mbe_pp_row;
  import rbm_pkg::*;
  localparam int unsigned N = 16;

  logic [N-1:0] a;
  booth_sel_t   sel;
  logic [N:0]   row;
  logic         neg;
  int checks = 0, failures = 0;

  mbe_pp_row #(.N(N)) dut (.a(a), .sel(sel), .row(row), .neg(neg));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 600; it++) begin
      case (it)
        0: a = '0;
        1: a = {1'b1, {(N-1){1'b0}}};
        2: a = {1'b0, {(N-1){1'b1}}};
        3: a = '1;
        default: a = N'($urandom);
      endcase
      for (int d = -2; d <= 2; d++) begin
        longint got, exp;
        sel.neg = (d < 0);
        sel.one = (d == 1 || d == -1);
        sel.two = (d == 2 || d == -2);
        #1;
        got = longint'(row) + longint'(neg) - (longint'(1) << N);
        exp = longint'(d) * longint'($signed(a));
        checks++;
        if (got != exp) begin
          failures++;
          $display("FAIL a=%0d d=%0d got %0d", $signed(a), d, got);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
