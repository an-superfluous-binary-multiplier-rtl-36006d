// tb_rb_mac: end-to-end test of the multiply-accumulate unit at its default
// size (64 x 64 bits, 8 guard bits).
//
// Each cycle it applies operands, checks the combinational product against a
// 128-bit reference, then checks the accumulated sum one clock later against
// a reference accumulator.  It counts how often each mechanism of the design
// was exercised and fails any that never was: every Booth digit value
// (-2, -1, 0, +1, +2), a negative top Booth digit (the variable bit of the
// correction word), both extreme operands, accumulate, clear, restart
// (clear with enable), hold, and wrap-around of the sum.
module tb_rb_mac;
  localparam int unsigned N = 64, G = 8;

  logic clk = 0, rst_n = 0, acc_en = 0, acc_clr = 0;
  logic [N-1:0] a = '0, b = '0;
  logic [2*N-1:0] product;
  logic [2*N+G-1:0] acc, model;
  int checks = 0, failures = 0;
  int n_digit[5], n_topneg, n_ext, n_acc, n_clr, n_load, n_hold, n_wrap;

  rb_mac dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .acc_en(acc_en),
              .acc_clr(acc_clr), .product(product), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] operand(int k);
    case (k)
      0: return {1'b1, {(N-1){1'b0}}};
      1: return {1'b0, {(N-1){1'b1}}};
      2: return '1;
      3: return '0;
      default: return {$urandom, $urandom};
    endcase
  endfunction

  initial begin
    foreach (n_digit[i]) n_digit[i] = 0;
    {n_topneg, n_ext, n_acc, n_clr, n_load, n_hold, n_wrap} = '0;
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      int r;
      logic signed [2*N-1:0] e;
      logic [2*N+G-1:0] old;
      @(negedge clk);
      // Long runs of extreme operands drive the sum around its range.
      if (c >= 1000 && c < 1700) begin
        a = operand(0); b = operand(0);
      end else begin
        a = operand(c < 30 ? c % 5 : (c % 11 == 0 ? $urandom_range(0, 3) : 9));
        b = operand(c < 30 ? c / 5 : (c % 13 == 0 ? $urandom_range(0, 3) : 9));
      end
      r = $urandom_range(0, 99);
      acc_en  = (c >= 1000 && c < 1700) || (r < 75) || (r >= 97);
      acc_clr = !(c >= 1000 && c < 1700) && (r >= 92);
      #1;
      e = (2*N)'($signed(a)) * (2*N)'($signed(b));
      checks++;
      if (product !== e) begin
        failures++;
        if (failures < 10) $display("FAIL product %h * %h = %h exp %h", a, b, product, e);
      end
      for (int j = 0; j < N/2; j++) begin
        int d;
        d = -2 * int'(b[2*j+1]) + int'(b[2*j]) + ((j == 0) ? 0 : int'(b[2*j-1]));
        n_digit[d + 2]++;
        if (j == N/2 - 1 && d < 0) n_topneg++;
      end
      if (a == operand(0) || b == operand(0) || a == operand(1)) n_ext++;
      @(posedge clk);
      old = model;
      if (acc_clr && acc_en)  begin model = {{G{e[2*N-1]}}, e}; n_load++; end
      else if (acc_clr)       begin model = '0; n_clr++; end
      else if (acc_en) begin
        model = model + {{G{e[2*N-1]}}, e};
        n_acc++;
        if ($signed(model) < 0 && $signed(old) > 0 && !e[2*N-1]) n_wrap++;
      end
      else n_hold++;
      #1;
      checks++;
      if (acc !== model) begin
        failures++;
        if (failures < 10) $display("FAIL acc cycle %0d", c);
      end
    end
    $display("digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d topneg:%0d extreme:%0d",
             n_digit[0], n_digit[1], n_digit[2], n_digit[3], n_digit[4], n_topneg, n_ext);
    $display("accumulate:%0d clear:%0d restart:%0d hold:%0d wrap:%0d", n_acc, n_clr, n_load, n_hold, n_wrap);
    foreach (n_digit[i]) begin checks++; if (n_digit[i] == 0) failures++; end
    checks++; if (n_topneg == 0) failures++;
    checks++; if (n_ext == 0)    failures++;
    checks++; if (n_acc == 0)    failures++;
    checks++; if (n_clr == 0)    failures++;
    checks++; if (n_load == 0)   failures++;
    checks++; if (n_hold == 0)   failures++;
    checks++; if (n_wrap == 0)   begin failures++; $display("FAIL sum never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
