// compressor_tree: adds N unsigned words of W bits into one W-bit word
// (modulo 2^W), the bit heap that collects every tile product, the
// correction constant and the round bit of the truncated multiplier.
//
// The words are reduced with layers of 3:2 carry-save compressors (full
// adders applied bitwise) until two are left, then one carry-propagate adder
// gives the sum. Each layer turns every group of three words into a sum and a
// shifted carry word and passes the rest on, so the depth is about
// log1.5(N/2) full adders plus the final adder. The document only names the
// compressor tree and its average cost; this 3:2 structure is this design's
// own choice. Combinational.
//
// Interface: ops[N] (W bits each), sum (W bits).
module compressor_tree #(
  parameter int unsigned N = 4,
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] ops [N],
  output logic [W-1:0] sum
);

  // Words left after `lvl` layers of 3:2 compression.
  function automatic int words_after(int lvl);
    int c;
    c = int'(N);
    for (int i = 0; i < lvl; i++)
      if (c > 2) c = (c / 3) * 2 + (c % 3);
    return c;
  endfunction

  function automatic int num_layers();
    int l;
    l = 0;
    while (words_after(l) > 2) l++;
    return l;
  endfunction

  localparam int L = num_layers();

  // Each layer has its own word arrays, so no signal feeds back on itself.
  for (genvar l = 0; l < L; l++) begin : g_layer
    localparam int CI = words_after(l);
    localparam int G  = CI / 3;
    localparam int R  = CI % 3;
    logic [W-1:0] wi [CI];
    logic [W-1:0] wo [2*G+R];
    if (l == 0) begin : g_src
      assign wi = ops[0:CI-1];
    end else begin : g_src
      assign wi = g_layer[l-1].wo;
    end
    for (genvar g = 0; g < G; g++) begin : g_fa
      assign wo[2*g]   = wi[3*g] ^ wi[3*g+1] ^ wi[3*g+2];
      assign wo[2*g+1] = ((wi[3*g] & wi[3*g+1]) | (wi[3*g] & wi[3*g+2]) |
                          (wi[3*g+1] & wi[3*g+2])) << 1;
    end
    for (genvar r = 0; r < R; r++) begin : g_pass
      assign wo[2*G+r] = wi[3*G+r];
    end
  end

  if (L == 0) begin : g_final
    if (N >= 2) begin : g_two
      assign sum = ops[0] + ops[1];
    end else begin : g_one
      assign sum = ops[0];
    end
  end else begin : g_final
    assign sum = g_layer[L-1].wo[0] + g_layer[L-1].wo[1];
  end

endmodule
