// compressor_leaf: generic M x M compressor used as a switching module of a
// 2X-network.
//
// The block receives an out-band start address `start` (0..M-1). The r-th
// active input (r = 0 for the topmost) leaves on output (start + r) mod M,
// and the r-th idle input on output (start - 1 - r) mod M, so the block is a
// permutation. It also passes on next_start = (start + k) mod M, the running
// sum that the next module of a serially controlled first stage needs, where
// k is the number of active inputs.
//
// The document requires only that every switching module be a compressor. It
// leaves the insides of modules of arbitrary size (such as 6 x 6) open, so
// this block is the simplest circuit with that function: a prefix count of
// the activity bits gives each input its destination, and each output is an
// OR-select of the input whose destination it is. Sending idle packets to
// the free outputs in reverse order is this design's choice, matching the
// iterative-cell network.
//
// Purely combinational.
module compressor_leaf #(
  parameter int unsigned M  = 6,                        // ports
  parameter int unsigned W  = 8,                        // payload width (assumed)
  parameter int unsigned SW = (M > 1) ? $clog2(M) : 1   // start address width
) (
  input  logic [SW-1:0]  start,
  input  logic [M-1:0]   in_act,
  input  logic [W-1:0]   in_data [M],
  output logic [M-1:0]   out_act,
  output logic [W-1:0]   out_data [M],
  output logic [SW-1:0]  next_start
);

  localparam int unsigned CW = $clog2(2*M + 1);  // holds start + M

  logic [CW-1:0] dest [M];
  logic [CW-1:0] n_act;

  // Active packets count upward from start and idle ones downward from
  // start - 1; both sums stay within one period of M, so a single
  // conditional add or subtract replaces the modulo.
  always_comb begin
    logic [CW-1:0] a_cnt;
    logic [CW-1:0] i_cnt;
    logic [CW-1:0] up;
    logic [CW-1:0] down;
    a_cnt = '0;
    i_cnt = '0;
    for (int i = 0; i < M; i++) begin
      up   = CW'(start) + a_cnt;                    // start + r, below 2M
      down = CW'(start) + CW'(M) - 1'b1 - i_cnt;    // start - 1 - r + M, in 0 .. 2M-1
      if (in_act[i]) begin
        dest[i] = (up >= CW'(M)) ? up - CW'(M) : up;
        a_cnt   = a_cnt + 1'b1;
      end else begin
        dest[i] = (down >= CW'(M)) ? down - CW'(M) : down;
        i_cnt   = i_cnt + 1'b1;
      end
    end
    n_act = a_cnt;
  end

  logic [CW-1:0] next_sum;
  assign next_sum   = CW'(start) + n_act;
  assign next_start = SW'((next_sum >= CW'(M)) ? next_sum - CW'(M) : next_sum);

  always_comb begin
    for (int o = 0; o < M; o++) begin
      out_act[o]  = 1'b0;
      out_data[o] = '0;
      for (int i = 0; i < M; i++) begin
        if (dest[i] == CW'(o)) begin
          out_act[o]  = out_act[o] | in_act[i];
          out_data[o] = out_data[o] | in_data[i];
        end
      end
    end
  end

endmodule
