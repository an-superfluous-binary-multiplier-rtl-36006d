// tb_rbpp_tree: random check of the RB accumulation tree with 5 rows (so an
// odd row passes a level) and with 16 rows of 128 digits (the size of the
// 64 x 64 multiplier).  The RB sum must equal the sum of the rows' values.
module tb_rbpp_tree;
  import rbm_pkg::*;
  localparam int unsigned W1 = 20, R1 = 5;
  localparam int unsigned W2 = 128, R2 = 16;

  rb_digit_t [R1-1:0][W1-1:0] pp1;
  rb_digit_t [W1-1:0]         s1;
  rb_digit_t [R2-1:0][W2-1:0] pp2;
  rb_digit_t [W2-1:0]         s2;
  int checks = 0, failures = 0;

  rbpp_tree #(.W(W1), .ROWS(R1)) dut1 (.pp(pp1), .sum(s1));
  rbpp_tree #(.W(W2), .ROWS(R2)) dut2 (.pp(pp2), .sum(s2));

  function automatic logic [W1-1:0] val1(rb_digit_t [W1-1:0] r);
    logic [W1-1:0] v;
    v = '0;
    for (int i = 0; i < W1; i++)
      v = v + (W1'(r[i].p) << i) - (W1'(r[i].m) << i);
    return v;
  endfunction

  function automatic logic [W2-1:0] val2(rb_digit_t [W2-1:0] r);
    logic [W2-1:0] v;
    v = '0;
    for (int i = 0; i < W2; i++)
      v = v + (W2'(r[i].p) << i) - (W2'(r[i].m) << i);
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 2000; it++) begin
      logic [W1-1:0] e;
      for (int r = 0; r < R1; r++)
        for (int i = 0; i < W1; i++) pp1[r][i] = rb_digit_t'($urandom);
      #1;
      e = '0;
      for (int r = 0; r < R1; r++) e = e + val1(pp1[r]);
      checks++;
      if (val1(s1) !== e) begin
        failures++;
        if (failures < 10) $display("FAIL 5-row tree");
      end
    end
    for (int it = 0; it < 300; it++) begin
      logic [W2-1:0] e;
      for (int r = 0; r < R2; r++)
        for (int i = 0; i < W2; i++) pp2[r][i] = rb_digit_t'($urandom);
      #1;
      e = '0;
      for (int r = 0; r < R2; r++) e = e + val2(pp2[r]);
      checks++;
      if (val2(s2) !== e) begin
        failures++;
        if (failures < 10) $display("FAIL 16-row tree");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
