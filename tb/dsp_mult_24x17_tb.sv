// dsp_mult_24x17_tb: random and corner operands for the 24 x 17 DSP tile,
// checked against a shift-and-add product computed in the testbench.
// Combinational; one time unit per input pair.
module dsp_mult_24x17_tb;
  int checks = 0, failures = 0;

  logic [23:0] a;
  logic [16:0] b;
  logic [40:0] p;

  dsp_mult_24x17 dut (.a(a), .b(b), .p(p));

  function automatic logic [40:0] ref_mul(input logic [23:0] x, input logic [16:0] y);
    logic [40:0] s;
    s = '0;
    for (int j = 0; j < 17; j++) if (y[j]) s += 41'(x) << j;
    return s;
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      a = 24'($urandom);
      b = 17'($urandom);
      if (i == 0) begin a = '1; b = '1; end
      if (i == 1) begin a = '1; b = '0; end
      if (i == 2) begin a = 24'd1; b = '1; end
      #1;
      checks++;
      if (p != ref_mul(a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL: %h * %h gave %h", a, b, p);
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
