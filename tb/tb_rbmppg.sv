// tb_rbmppg: checks the modified RB partial-product generator at N = 8
// (exhaustive) and N = 16 (random).  The RB rows must add up, with the
// correction word, to a * b modulo 2^2N; the generator must give N/4 rows
// and leave every digit below 4k-2 of row k empty.
module tb_rbmppg;
  import rbm_pkg::*;

  localparam int unsigned N1 = 8;
  localparam int unsigned N2 = 16;

  logic [N1-1:0] a1, b1;
  rb_digit_t [N1/4-1:0][2*N1-1:0] pp1;
  logic [2*N1-1:0] corr1;
  logic [N2-1:0] a2, b2;
  rb_digit_t [N2/4-1:0][2*N2-1:0] pp2;
  logic [2*N2-1:0] corr2;
  int checks = 0, failures = 0;

  rbmppg #(.N(N1)) dut1 (.a(a1), .b(b1), .pp(pp1), .corr(corr1));
  rbmppg #(.N(N2)) dut2 (.a(a2), .b(b2), .pp(pp2), .corr(corr2));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if ($size(pp1, 1) != N1/4 || $size(pp2, 1) != N2/4) failures++;
    for (int v = 0; v < (1 << (2*N1)); v++) begin
      logic [2*N1-1:0] acc, exp;
      {a1, b1} = (2*N1)'(v);
      #1;
      acc = corr1;
      for (int k = 0; k < N1/4; k++)
        for (int i = 0; i < 2*N1; i++) begin
          acc = acc + ((2*N1)'(pp1[k][i].p) << i) - ((2*N1)'(pp1[k][i].m) << i);
          if (i < 4*k - 2 && (pp1[k][i].p || pp1[k][i].m)) begin
            failures++;
            $display("FAIL row %0d digit %0d below its slots", k, i);
          end
        end
      exp = (2*N1)'(longint'($signed(a1)) * longint'($signed(b1)));
      checks++;
      if (acc !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 a=%0d b=%0d rows give %h exp %h", $signed(a1), $signed(b1), acc, exp);
      end
    end
    for (int it = 0; it < 3000; it++) begin
      logic [2*N2-1:0] acc, exp;
      a2 = N2'($urandom);
      b2 = N2'($urandom);
      if (it == 0) begin a2 = {1'b1, {(N2-1){1'b0}}}; b2 = a2; end
      #1;
      acc = corr2;
      for (int k = 0; k < N2/4; k++)
        for (int i = 0; i < 2*N2; i++)
          acc = acc + ((2*N2)'(pp2[k][i].p) << i) - ((2*N2)'(pp2[k][i].m) << i);
      exp = (2*N2)'(longint'($signed(a2)) * longint'($signed(b2)));
      checks++;
      if (acc !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 a=%0d b=%0d", $signed(a2), $signed(b2));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
