// rp_init: initial running parities of a 2^LOG_N-input baseline-swap
// compressor, computed from the starting output address D.
//
// The compressor has LOG_N stages; stage i holds 2^i chains of iterative
// cells, and chain j of stage i needs an initial running parity RP(i,j).
// RP(i,j) is bit (2^i - 1) + j of the output vector rp. Every RP is a closed
// AND/OR/XOR expression of the bits d_0..d_i of D (the document's explicit
// algorithm), evaluated left to right:
//   * i = 0:                RP = d_0
//   * otherwise let l be the length of the leading run of ones in the i-bit
//     index j = j_{i-1}..j_0 (MSB first);
//       l = i:              RP = d_i
//       else:               skip j_{i-1-l} (a zero), then starting with d_l
//                           append d_{x+1} with OR when j_{i-x-2} = 0 and AND
//                           when it is 1, for x = l..i-2; finally XOR d_i.
// The expressions are generated at elaboration from the constant (i,j); no
// signal is shared between them (the document notes that sharing would save
// gates, which a synthesis tool may still do).
//
// Purely combinational.
module rp_init #(
  parameter int unsigned LOG_N = 4  // network has 2^LOG_N inputs (16, as in the 16x16 circuit)
) (
  input  logic [LOG_N-1:0]        d,   // starting output address D_n
  output logic [(1<<LOG_N)-2:0]   rp   // RP(i,j) at bit (2^i - 1) + j
);

  // Value of RP(i,j) for address dv; i and j are elaboration constants.
  function automatic logic rp_expr(input logic [LOG_N-1:0] dv, input int i, input int j);
    int  l;
    logic acc;
    logic run;
    if (i == 0) return dv[0];
    // length of the leading run of ones of j (i bits, MSB first)
    l   = 0;
    run = 1'b1;
    for (int b = LOG_N - 1; b >= 0; b--) begin
      if (b < i) begin
        if (run && ((j >> b) & 1) == 1) l++;
        else run = 1'b0;
      end
    end
    if (l == i) return dv[i];
    acc = dv[l];
    for (int x = 0; x < LOG_N - 1; x++) begin
      if (x >= l && x <= i - 2) begin
        if (((j >> (i - x - 2)) & 1) == 1) acc = acc & dv[x+1];
        else                               acc = acc | dv[x+1];
      end
    end
    return acc ^ dv[i];
  endfunction

  for (genvar gi = 0; gi < LOG_N; gi++) begin : g_stage
    for (genvar gj = 0; gj < (1 << gi); gj++) begin : g_chain
      assign rp[(1 << gi) - 1 + gj] = rp_expr(d, gi, gj);
    end
  end

endmodule
