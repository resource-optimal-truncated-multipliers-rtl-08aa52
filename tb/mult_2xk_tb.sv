// mult_2xk_tb: tests the 2 x k tile exhaustively for k = 8 and with random
// operands for k = 20 against the integer product. Combinational; one time
// unit per input pair.
module mult_2xk_tb;
  int checks = 0, failures = 0;

  logic [1:0]  x8, x20;
  logic [7:0]  y8;
  logic [19:0] y20;
  logic [9:0]  p8;
  logic [21:0] p20;

  mult_2xk #(.K(8))  u8  (.x(x8),  .y(y8),  .p(p8));
  mult_2xk #(.K(20)) u20 (.x(x20), .y(y20), .p(p20));

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 256; j++) begin
        x8 = 2'(i); y8 = 8'(j);
        x20 = 2'(i); y20 = 20'($urandom);
        if (j == 255) y20 = '1;
        #1;
        checks += 2;
        if (int'(p8) != i * j) begin
          failures++;
          $display("FAIL k=8: %0d*%0d gave %0d", i, j, p8);
        end
        if (p20 != 22'(x20) * 22'(y20)) begin
          failures++;
          $display("FAIL k=20: %0d*%0d gave %0d", x20, y20, p20);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
