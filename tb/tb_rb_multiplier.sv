// tb_rb_multiplier: checks the complete multiplier against integer
// multiplication: all 65536 operand pairs at N = 8, random pairs at N = 16
// and N = 32,
// and random plus extreme pairs (most negative, most positive, -1, 0) at the
// default N = 64 with a 128-bit reference product.
module tb_rb_multiplier;
  localparam int unsigned N1 = 8, N2 = 16, N3 = 64, N4 = 32;

  logic [N1-1:0] a1, b1;
  logic [2*N1-1:0] p1;
  logic [N2-1:0] a2, b2;
  logic [2*N2-1:0] p2;
  logic [N4-1:0] a4, b4;
  logic [2*N4-1:0] p4;
  logic [N3-1:0] a3, b3;
  logic [2*N3-1:0] p3;
  int checks = 0, failures = 0;

  rb_multiplier #(.N(N1)) dut1 (.a(a1), .b(b1), .p(p1));
  rb_multiplier #(.N(N2)) dut2 (.a(a2), .b(b2), .p(p2));
  rb_multiplier #(.N(N4)) dut4 (.a(a4), .b(b4), .p(p4));
  rb_multiplier dut3 (.a(a3), .b(b3), .p(p3));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N3-1:0] pick(int k);
    case (k)
      0: return {1'b1, {(N3-1){1'b0}}};
      1: return {1'b0, {(N3-1){1'b1}}};
      2: return '1;
      3: return '0;
      4: return 1;
      default: return {$urandom, $urandom};
    endcase
  endfunction

  initial begin
    for (int v = 0; v < (1 << (2*N1)); v++) begin
      {a1, b1} = (2*N1)'(v);
      #1;
      checks++;
      if ($signed(p1) !== (2*N1)'($signed(a1) * $signed(b1))) begin
        failures++;
        if (failures < 10) $display("FAIL N=8 %0d * %0d = %0d", $signed(a1), $signed(b1), $signed(p1));
      end
    end
    for (int it = 0; it < 5000; it++) begin
      a2 = N2'($urandom); b2 = N2'($urandom);
      #1;
      checks++;
      if (p2 !== (2*N2)'(longint'($signed(a2)) * longint'($signed(b2)))) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 %0d * %0d", $signed(a2), $signed(b2));
      end
    end
    for (int it = 0; it < 5000; it++) begin
      a4 = N4'($urandom); b4 = N4'($urandom);
      if (it == 0) begin a4 = {1'b1, {(N4-1){1'b0}}}; b4 = a4; end
      #1;
      checks++;
      if (p4 !== (2*N4)'(longint'($signed(a4)) * longint'($signed(b4)))) begin
        failures++;
        if (failures < 10) $display("FAIL N=32 %0d * %0d", $signed(a4), $signed(b4));
      end
    end
    for (int it = 0; it < 5000; it++) begin
      logic signed [2*N3-1:0] e;
      a3 = pick(it < 36 ? it % 6 : 9);
      b3 = pick(it < 36 ? it / 6 : 9);
      #1;
      e = (2*N3)'($signed(a3)) * (2*N3)'($signed(b3));
      checks++;
      if (p3 !== e) begin
        failures++;
        if (failures < 10) $display("FAIL N=64 %h * %h = %h exp %h", a3, b3, p3, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
