// tb_ppcs_adder: checks the hybrid parallel-prefix / carry-select adder at 16
// and 128 bits with random operands, both carry-in values and the full-width
// carry (all ones plus one): s must equal x + y + cin modulo 2^W.
module tb_ppcs_adder;
  localparam int unsigned W1 = 16, W2 = 128;

  logic [W1-1:0] x1, y1, s1;
  logic [W2-1:0] x2, y2, s2;
  logic          c1, c2;
  int checks = 0, failures = 0;

  ppcs_adder #(.W(W1), .BLK(4)) dut1 (.x(x1), .y(y1), .cin(c1), .s(s1));
  ppcs_adder #(.W(W2), .BLK(4)) dut2 (.x(x2), .y(y2), .cin(c2), .s(s2));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 20000; it++) begin
      x1 = W1'($urandom); y1 = W1'($urandom); c1 = it[0];
      x2 = {$urandom, $urandom, $urandom, $urandom};
      y2 = {$urandom, $urandom, $urandom, $urandom};
      c2 = it[1];
      if (it < 4) begin x1 = '1; y1 = '0; x2 = '1; y2 = '0; c1 = 1'b1; c2 = 1'b1; end
      if (it == 4) begin x2 = '1; y2 = '1; c2 = 1'b1; end
      #1;
      checks += 2;
      if (s1 !== x1 + y1 + W1'(c1)) begin
        failures++;
        if (failures < 10) $display("FAIL W=16 %h + %h + %b = %h", x1, y1, c1, s1);
      end
      if (s2 !== x2 + y2 + W2'(c2)) begin
        failures++;
        if (failures < 10) $display("FAIL W=128");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
