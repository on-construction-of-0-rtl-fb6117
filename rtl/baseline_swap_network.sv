// baseline_swap_network: 2^LOG_N x 2^LOG_N baseline network of iterative
// cells, appended with the swap exchange.
//
// This is the recursive 0-1 sorter unfolded. A compressor of M inputs is one
// front-end stage of M/2 iterative cells followed by two compressors of M/2
// inputs: output 0 of cell c feeds input c of the upper half, output 1 feeds
// input c of the lower half. The outputs of the two halves are interleaved,
// upper half to the even outputs and lower half to the odd ones. Unfolded,
// that gives LOG_N stages of N/2 cells. Stage s holds 2^s independent chains
// (sub-compressors of N/2^s inputs). The running parity enters the top cell
// of chain j of stage s from rp_init[(2^s - 1) + j] and passes down through
// the cells of that chain. The nested interleaving collapses into a single
// final exchange: the swap exchange, which reverses the bits of the port
// address.
//
// Active packets appear on circularly consecutive outputs in input order.
// Idle packets fill the remaining outputs in reverse order. The starting
// output depends on the initial running parities (see rp_init).
//
// next_start is the network's out-band output D' for use as a module of a
// larger 2X-network. Seen as a 2X-network, the baseline-swap network has
// m = 2 at every level, and D' concatenates the running sums of the last
// modules: bit s is the parity leaving the bottom cell of the last chain of
// stage s. With parities initialised for start D, this equals
// (D + number of active inputs) mod N.
//
// Purely combinational: the running parity ripples through N/2 cells per
// stage.
module baseline_swap_network #(
  parameter int unsigned LOG_N = 4,  // 2^LOG_N ports
  parameter int unsigned W     = 8   // payload width (assumed)
) (
  input  logic [(1<<LOG_N)-2:0]   rp_init,               // RP(s,j) at bit 2^s - 1 + j
  input  logic [(1<<LOG_N)-1:0]   in_act,
  input  logic [W-1:0]            in_data [1<<LOG_N],
  output logic [(1<<LOG_N)-1:0]   out_act,
  output logic [W-1:0]            out_data [1<<LOG_N],
  output logic [LOG_N-1:0]        next_start             // D': bit s = final parity of the last chain of stage s
);

  localparam int unsigned N = 1 << LOG_N;

  // Port address with its LOG_N bits reversed (the swap exchange).
  function automatic int unsigned bitrev(input int unsigned p);
    int unsigned r;
    r = 0;
    for (int b = 0; b < LOG_N; b++) r |= ((p >> b) & 1) << (LOG_N - 1 - b);
    return r;
  endfunction

  // Each stage block g_stage[s] holds the signals at its own output; stage s
  // reads the outputs of g_stage[s-1] (or the ports for s = 0).
  for (genvar s = 0; s < LOG_N; s++) begin : g_stage
    localparam int unsigned M = N >> s;  // chain (sub-compressor) size
    localparam int unsigned H = M / 2;   // cells per chain
    logic [N-1:0] st_in_act;
    logic [W-1:0] st_in_data [N];
    logic [N-1:0] st_out_act;
    logic [W-1:0] st_out_data [N];
    if (s == 0) begin : g_first
      assign st_in_act  = in_act;
      assign st_in_data = in_data;
    end else begin : g_next
      assign st_in_act  = g_stage[s-1].st_out_act;
      assign st_in_data = g_stage[s-1].st_out_data;
    end
    for (genvar k = 0; k < N/2; k++) begin : g_cell
      localparam int unsigned B = k / H;  // chain index j
      localparam int unsigned C = k % H;  // cell within chain
      logic rp_here;
      logic rp_next;
      if (C == 0) begin : g_head
        assign rp_here = rp_init[(1 << s) - 1 + B];
      end else begin : g_link
        assign rp_here = g_cell[k-1].rp_next;
      end
      iterative_cell #(.W(W)) u_cell (
        .rp_in     (rp_here),
        .act0      (st_in_act[B*M + 2*C]),
        .data0     (st_in_data[B*M + 2*C]),
        .act1      (st_in_act[B*M + 2*C + 1]),
        .data1     (st_in_data[B*M + 2*C + 1]),
        .act_out0  (st_out_act[B*M + C]),
        .data_out0 (st_out_data[B*M + C]),
        .act_out1  (st_out_act[B*M + H + C]),
        .data_out1 (st_out_data[B*M + H + C]),
        .rp_out    (rp_next)
      );
    end
    assign next_start[s] = g_cell[N/2 - 1].rp_next;
  end

  for (genvar p = 0; p < N; p++) begin : g_swap
    assign out_act[bitrev(p)]  = g_stage[LOG_N-1].st_out_act[p];
    assign out_data[bitrev(p)] = g_stage[LOG_N-1].st_out_data[p];
  end

endmodule
