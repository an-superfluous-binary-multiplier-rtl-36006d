// tb_mbe_encoder: exhaustive check of the radix-4 Booth encoder at N = 8.
// For every multiplier value it recomputes each digit from its bit triplet,
// compares the one/two/neg selects with it, and checks that the digits
// rebuild the signed multiplier (sum d_j * 4^j == b).
module tb_mbe_encoder;
  import rbm_pkg::*;
  localparam int unsigned N = 8;

  logic [N-1:0]         b;
  booth_sel_t [N/2-1:0] sel;
  int checks = 0, failures = 0;

  mbe_encoder #(.N(N)) dut (.b(b), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      int sum, d, bm1;
      b = N'(v);
      #1;
      sum = 0;
      for (int j = 0; j < N/2; j++) begin
        bm1 = (j == 0) ? 0 : int'(b[2*j-1]);
        d = -2 * int'(b[2*j+1]) + int'(b[2*j]) + bm1;
        checks++;
        if (sel[j].one !== (d == 1 || d == -1) || sel[j].two !== (d == 2 || d == -2)
            || sel[j].neg !== (d < 0)) begin
          failures++;
          $display("FAIL b=%h digit %0d d=%0d sel=%b", b, j, d, sel[j]);
        end
        sum += (sel[j].neg ? -1 : 1) * (sel[j].two ? 2 : (sel[j].one ? 1 : 0)) * (4 ** j);
      end
      checks++;
      if (sum != int'($signed(b))) begin
        failures++;
        $display("FAIL b=%h rebuilds to %0d", b, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
