// baseline_swap_compressor: cyclic 0-1 sorter built from the baseline-swap
// network of iterative cells and its running-parity initializer.
//
// The k-th active input, counted from the top, leaves on output
// (d_start + k) mod 2^LOG_N, and idle inputs fill the other outputs in
// reverse order. With d_start = 0 the block is an ordinary 0-1 sorter
// (concentrator). When invert is set, every initial running parity is
// complemented. The network then treats idle packets as the ones to
// compress from d_start upward, and the active ones are stacked downward
// from d_start - 1, last active input first. The fairness mode uses this.
//
// next_start is the out-band output D': the address that follows the last
// packet compressed upward from d_start. That is (d_start + active count)
// mod N normally, and (d_start + idle count) mod N when inverted.
//
// Purely combinational: start address and activity bits in, routed packets
// out in the same cycle.
module baseline_swap_compressor #(
  parameter int unsigned LOG_N = 4,  // 2^LOG_N ports (16)
  parameter int unsigned W     = 8   // payload width (assumed)
) (
  input  logic [LOG_N-1:0]        d_start,  // output address of the first active packet
  input  logic                    invert,   // complement all initial running parities
  input  logic [(1<<LOG_N)-1:0]   in_act,
  input  logic [W-1:0]            in_data [1<<LOG_N],
  output logic [(1<<LOG_N)-1:0]   out_act,
  output logic [W-1:0]            out_data [1<<LOG_N],
  output logic [LOG_N-1:0]        next_start  // D' = (d_start + packets compressed from d_start upward) mod N
);

  logic [(1<<LOG_N)-2:0] rp_calc;
  logic [(1<<LOG_N)-2:0] rp_applied;
  logic [LOG_N-1:0]      net_next;

  rp_init #(.LOG_N(LOG_N)) u_rp_init (
    .d  (d_start),
    .rp (rp_calc)
  );

  assign rp_applied = invert ? ~rp_calc : rp_calc;

  baseline_swap_network #(.LOG_N(LOG_N), .W(W)) u_network (
    .rp_init    (rp_applied),
    .in_act     (in_act),
    .in_data    (in_data),
    .out_act    (out_act),
    .out_data   (out_data),
    .next_start (net_next)
  );

  // With inverted initial parities every parity in the chains is inverted
  // too, so the network's D' is restored by one more inversion.
  assign next_start = invert ? ~net_next : net_next;

endmodule
