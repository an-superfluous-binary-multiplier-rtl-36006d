// tb_rb2nb_converter: checks the RB-to-two's-complement converter at 32
// digits and at the 128 digits of the 64 x 64 multiplier: p must equal
// X+ - X- + corr modulo 2^W for random RB numbers and correction words,
// including the carry that runs the full width (all-ones plus one).
module tb_rb2nb_converter;
  import rbm_pkg::*;
  localparam int unsigned W1 = 32, W2 = 128;

  rb_digit_t [W1-1:0] x1;
  logic [W1-1:0]      c1, p1;
  rb_digit_t [W2-1:0] x2;
  logic [W2-1:0]      c2, p2;
  int checks = 0, failures = 0;

  rb2nb_converter #(.W(W1), .BLK(4)) dut1 (.x(x1), .corr(c1), .p(p1));
  rb2nb_converter #(.W(W2), .BLK(4)) dut2 (.x(x2), .corr(c2), .p(p2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 4000; it++) begin
      logic [W1-1:0] vp1, vm1;
      logic [W2-1:0] vp2, vm2;
      vp1 = $urandom; vm1 = $urandom; c1 = $urandom;
      vp2 = {$urandom, $urandom, $urandom, $urandom};
      vm2 = {$urandom, $urandom, $urandom, $urandom};
      c2  = {$urandom, $urandom, $urandom, $urandom};
      if (it == 0) begin vp1 = '1; vm1 = '0; c1 = 1; vp2 = '1; vm2 = '0; c2 = 1; end
      if (it == 1) begin vp1 = '0; vm1 = 1; c1 = '0; vp2 = '0; vm2 = 1; c2 = '0; end
      for (int i = 0; i < W1; i++) begin x1[i].p = vp1[i]; x1[i].m = vm1[i]; end
      for (int i = 0; i < W2; i++) begin x2[i].p = vp2[i]; x2[i].m = vm2[i]; end
      #1;
      checks += 2;
      if (p1 !== vp1 - vm1 + c1) begin
        failures++;
        if (failures < 10) $display("FAIL W=32 %h - %h + %h gave %h", vp1, vm1, c1, p1);
      end
      if (p2 !== vp2 - vm2 + c2) begin
        failures++;
        if (failures < 10) $display("FAIL W=128");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
