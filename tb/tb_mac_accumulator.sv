// tb_mac_accumulator: drives the accumulator (16-bit products, 8 guard bits)
// with random enable / clear / product sequences and compares acc with a
// reference sum every cycle; reset, hold, clear, load and wrap-around each
// occur.  The sum must update one clock after the request.
module tb_mac_accumulator;
  localparam int unsigned PW = 16, G = 8;

  logic clk = 0, rst_n = 0, en = 0, clr = 0;
  logic [PW-1:0] product = '0;
  logic [PW+G-1:0] acc, model;
  int checks = 0, failures = 0;

  mac_accumulator #(.PW(PW), .GUARD(G)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .product(product), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (acc !== '0) failures++;
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      int r;
      @(negedge clk);
      r = $urandom_range(0, 99);
      en  = (r < 70) || (r >= 95);
      clr = (r >= 90);
      product = (c % 7 == 0) ? {1'b1, {(PW-1){1'b0}}} : PW'($urandom);
      @(posedge clk);
      if (clr && en)  model = {{G{product[PW-1]}}, product};
      else if (clr)   model = '0;
      else if (en)    model = model + {{G{product[PW-1]}}, product};
      #1;
      checks++;
      if (acc !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d acc=%h model=%h", c, acc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
