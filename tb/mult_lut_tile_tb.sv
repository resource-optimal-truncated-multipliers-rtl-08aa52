// mult_lut_tile_tb: exhaustive test of the LUT tile shapes 1x1, 1x2, 2x1,
// 2x3, 3x2 and 3x3 against the integer product. Combinational; one time unit
// per input pair.
module mult_lut_tile_tb;
  int checks = 0, failures = 0;

  logic [0:0] a11, b11; logic [1:0]  p11;
  logic [0:0] a12;      logic [1:0]  b12; logic [2:0] p12;
  logic [1:0] a21;      logic [0:0]  b21; logic [2:0] p21;
  logic [1:0] a23;      logic [2:0]  b23; logic [4:0] p23;
  logic [2:0] a32;      logic [1:0]  b32; logic [4:0] p32;
  logic [2:0] a33, b33;                   logic [5:0] p33;

  mult_lut_tile #(.WA(1), .WB(1)) u11 (.a(a11), .b(b11), .p(p11));
  mult_lut_tile #(.WA(1), .WB(2)) u12 (.a(a12), .b(b12), .p(p12));
  mult_lut_tile #(.WA(2), .WB(1)) u21 (.a(a21), .b(b21), .p(p21));
  mult_lut_tile #(.WA(2), .WB(3)) u23 (.a(a23), .b(b23), .p(p23));
  mult_lut_tile #(.WA(3), .WB(2)) u32 (.a(a32), .b(b32), .p(p32));
  mult_lut_tile #(.WA(3), .WB(3)) u33 (.a(a33), .b(b33), .p(p33));

  task automatic chk(input int got, input int expv, input string what);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, expv);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a11 = 1'(i); b11 = 1'(j);
        a12 = 1'(i); b12 = 2'(j);
        a21 = 2'(i); b21 = 1'(j);
        a23 = 2'(i); b23 = 3'(j);
        a32 = 3'(i); b32 = 2'(j);
        a33 = 3'(i); b33 = 3'(j);
        #1;
        chk(int'(p11), int'(a11) * int'(b11), "1x1");
        chk(int'(p12), int'(a12) * int'(b12), "1x2");
        chk(int'(p21), int'(a21) * int'(b21), "2x1");
        chk(int'(p23), int'(a23) * int'(b23), "2x3");
        chk(int'(p32), int'(a32) * int'(b32), "3x2");
        chk(int'(p33), i * j, "3x3");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
