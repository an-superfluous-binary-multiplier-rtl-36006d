// tb_rb_adder: random check of the 24-digit RB adder: value(z) must equal
// value(x) + value(y) modulo 2^24, for random digit codings including the
// extreme all +1 and all -1 operands.
module tb_rb_adder;
  import rbm_pkg::*;
  localparam int unsigned W = 24;

  rb_digit_t [W-1:0] x, y, z;
  int checks = 0, failures = 0;

  rb_adder #(.W(W)) dut (.x(x), .y(y), .z(z));

  function automatic logic [W-1:0] val(rb_digit_t [W-1:0] r);
    logic [W-1:0] vp, vm;
    for (int i = 0; i < W; i++) begin
      vp[i] = r[i].p;
      vm[i] = r[i].m;
    end
    return vp - vm;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 5000; it++) begin
      x = (2*W)'({$urandom, $urandom});
      y = (2*W)'({$urandom, $urandom});
      if (it == 0) begin
        for (int i = 0; i < W; i++) begin x[i] = '{p:1'b1, m:1'b0}; y[i] = '{p:1'b1, m:1'b0}; end
      end
      if (it == 1) begin
        for (int i = 0; i < W; i++) begin x[i] = '{p:1'b0, m:1'b1}; y[i] = '{p:1'b0, m:1'b1}; end
      end
      #1;
      checks++;
      if (val(z) !== val(x) + val(y)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h z=%h", val(x), val(y), val(z));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
