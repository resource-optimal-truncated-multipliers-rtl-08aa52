// compressor_tree_tb: sums of 1, 2, 3, 7 and 20 random words (including
// all-ones words that carry out of the top bit) checked against a plain
// running sum modulo 2^W. Combinational; one time unit per vector.
module compressor_tree_tb;
  int checks = 0, failures = 0;

  localparam int W = 24;

  logic [W-1:0] o1 [1];
  logic [W-1:0] o2 [2];
  logic [W-1:0] o3 [3];
  logic [W-1:0] o7 [7];
  logic [W-1:0] o20 [20];
  logic [W-1:0] s1, s2, s3, s7, s20;

  compressor_tree #(.N(1),  .W(W)) u1  (.ops(o1),  .sum(s1));
  compressor_tree #(.N(2),  .W(W)) u2  (.ops(o2),  .sum(s2));
  compressor_tree #(.N(3),  .W(W)) u3  (.ops(o3),  .sum(s3));
  compressor_tree #(.N(7),  .W(W)) u7  (.ops(o7),  .sum(s7));
  compressor_tree #(.N(20), .W(W)) u20 (.ops(o20), .sum(s20));

  function automatic logic [W-1:0] word(input int i, input int k);
    if (i == 0) return '1;
    if (i == 1) return W'(1) << (k % W);
    return W'($urandom);
  endfunction

  task automatic chk(input logic [W-1:0] got, input logic [W-1:0] expv, input int n);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d: got %h expected %h", n, got, expv);
    end
  endtask

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [W-1:0] e1, e2, e3, e7, e20;
      e1 = '0; e2 = '0; e3 = '0; e7 = '0; e20 = '0;
      for (int k = 0; k < 20; k++) begin
        o20[k] = word(i, k); e20 += o20[k];
        if (k < 7) begin o7[k] = word(i, k + 3); e7 += o7[k]; end
        if (k < 3) begin o3[k] = word(i, k + 5); e3 += o3[k]; end
        if (k < 2) begin o2[k] = word(i, k + 7); e2 += o2[k]; end
        if (k < 1) begin o1[k] = word(i, k + 9); e1 += o1[k]; end
      end
      #1;
      chk(s1, e1, 1);
      chk(s2, e2, 2);
      chk(s3, e3, 3);
      chk(s7, e7, 7);
      chk(s20, e20, 20);
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
