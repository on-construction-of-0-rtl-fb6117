// compressor_2x: (M, N) 2X-network compressor with M*N ports.
//
// Structure (recursive 2X-construction): a first stage of N switching modules
// of size M x M, numbered 0..N-1 from the top, and a second stage of M
// modules of size N x N. Output j of first-stage module i drives input i of
// second-stage module j. The final exchange is the inverse of that
// interstage exchange: output b of second-stage module a drives network
// output b*M + a. Every switching module here is a compressor_leaf.
//
// Control (the document's control algorithm for a 2X-network): write the
// start address D = x*M + y with 0 <= y < M.
//   * First stage, serial: module 0 gets y; module i+1 gets the running sum
//     (y + k_0 + ... + k_i) mod M, where k_p is the number of active inputs
//     of module p. Each module produces this sum itself (next_start).
//   * Second stage, independent: module i gets x if i >= y, else
//     (x + 1) mod N.
//   * Out-band output for use as a module of a larger 2X-network:
//     D' = ((x + k') mod N) * M + (y + sum of all k_p) mod M, where k' is
//     the number of packets entering the last second-stage module.
// Active packets leave on outputs D, D+1, ... (mod M*N) in input order.
// d_start must be below M*N.
//
// Defaults (6, 4) are the document's 24 x 24 example. Purely combinational.
module compressor_2x #(
  parameter int unsigned M  = 6,   // size of first-stage modules / number of second-stage modules
  parameter int unsigned N  = 4,   // number of first-stage modules / size of second-stage modules
  parameter int unsigned W  = 8,   // payload width (assumed)
  parameter int unsigned SW = $clog2(M*N)
) (
  input  logic [SW-1:0]   d_start,       // D: output address of the first active packet
  input  logic [M*N-1:0]  in_act,
  input  logic [W-1:0]    in_data [M*N],
  output logic [M*N-1:0]  out_act,
  output logic [W-1:0]    out_data [M*N],
  output logic [SW-1:0]   next_start     // D'
);

  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned NW = (N > 1) ? $clog2(N) : 1;

  logic [MW-1:0] y;
  logic [NW-1:0] x;
  logic [MW-1:0] chain [N+1];     // first-stage serial control
  logic [NW-1:0] ctl2  [M];       // second-stage controls
  logic [NW-1:0] last2_next;      // running sum out of the last second-stage module

  assign y        = MW'(d_start % SW'(M));
  assign x        = NW'(d_start / SW'(M));
  assign chain[0] = y;

  // interstage wires: s1_*[i][j] = output j of first-stage module i
  logic [M-1:0] s1_act  [N];
  logic [W-1:0] s1_data [N][M];
  // inputs of second-stage modules: s2i_*[j][i] = input i of module j
  logic [N-1:0] s2i_act  [M];
  logic [W-1:0] s2i_data [M][N];
  logic [N-1:0] s2o_act  [M];
  logic [W-1:0] s2o_data [M][N];

  for (genvar i = 0; i < N; i++) begin : g_stage1
    logic [W-1:0] mod_in_data [M];
    for (genvar p = 0; p < M; p++) begin : g_in
      assign mod_in_data[p] = in_data[i*M + p];
    end
    compressor_leaf #(.M(M), .W(W), .SW(MW)) u_mod (
      .start      (chain[i]),
      .in_act     (in_act[i*M +: M]),
      .in_data    (mod_in_data),
      .out_act    (s1_act[i]),
      .out_data   (s1_data[i]),
      .next_start (chain[i+1])
    );
  end

  for (genvar j = 0; j < M; j++) begin : g_stage2
    for (genvar i = 0; i < N; i++) begin : g_x
      assign s2i_act[j][i]  = s1_act[i][j];
      assign s2i_data[j][i] = s1_data[i][j];
    end
    assign ctl2[j] = (32'(j) >= 32'(y)) ? x : NW'((32'(x) + 1) % N);
    logic [NW-1:0] mod_next;
    compressor_leaf #(.M(N), .W(W), .SW(NW)) u_mod (
      .start      (ctl2[j]),
      .in_act     (s2i_act[j]),
      .in_data    (s2i_data[j]),
      .out_act    (s2o_act[j]),
      .out_data   (s2o_data[j]),
      .next_start (mod_next)
    );
    if (j == M - 1) begin : g_last
      assign last2_next = mod_next;
    end
    // final exchange: output b of module j -> network output b*M + j
    for (genvar b = 0; b < N; b++) begin : g_out
      assign out_act[b*M + j]  = s2o_act[j][b];
      assign out_data[b*M + j] = s2o_data[j][b];
    end
  end

  assign next_start = SW'(32'(last2_next) * M + 32'(chain[N]));

endmodule
