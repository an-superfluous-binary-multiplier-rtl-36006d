// tb_rbfa: exhaustive check of the RB full-adder cell.  For every pair of
// input digits (both codings of zero included), every neighbour condition and
// every transfer that condition allows, it checks
//   value(z) - t_in + 2 * t_out == value(x) + value(y),
// that z is a legal digit, and that nonneg is right.
module tb_rbfa;
  import rbm_pkg::*;

  rb_digit_t         x, y, z;
  logic              lo_nonneg, nonneg;
  logic signed [1:0] t_in, t_out;
  int checks = 0, failures = 0;

  rbfa dut (.x(x), .y(y), .lo_nonneg(lo_nonneg), .t_in(t_in),
            .nonneg(nonneg), .t_out(t_out), .z(z));

  function automatic int dv(rb_digit_t d);
    return int'(d.p) - int'(d.m);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xv = 0; xv < 4; xv++)
      for (int yv = 0; yv < 4; yv++)
        for (int ln = 0; ln < 2; ln++)
          for (int tv = 0; tv < 2; tv++) begin
            x = rb_digit_t'(xv);
            y = rb_digit_t'(yv);
            lo_nonneg = ln[0];
            t_in = ln[0] ? 2'(tv) : -2'(tv);
            #1;
            checks++;
            if (z.p && z.m) begin
              failures++;
              $display("FAIL z coded (1,1)");
            end
            if (dv(z) - int'(t_in) + 2 * int'(t_out) != dv(x) + dv(y)
                || nonneg !== (dv(x) >= 0 && dv(y) >= 0)) begin
              failures++;
              $display("FAIL x=%0d y=%0d ln=%0d t_in=%0d z=%0d t_out=%0d", dv(x), dv(y), ln, t_in, dv(z), t_out);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
