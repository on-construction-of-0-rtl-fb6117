// compressor_2x_nested: a large 2X-network compressor whose switching modules
// are themselves 2X-network compressors.
//
// The outer network has (m, n) = (M1*M2, N1*N2). Its first stage is n
// compressor_2x modules with (M1, M2), each m x m. Its second stage is m
// compressor_2x modules with (N1, N2), each n x n. Wiring and control are
// the same as in compressor_2x. Each first-stage module passes its running
// sum mod m (its D' output) to the module below, and the control of
// second-stage module i is x when i >= y and (x + 1) mod n otherwise, where
// D = x*m + y. The block itself produces D' as well, so it could in turn
// serve as a module of a still larger network.
//
// The defaults build the document's 384 x 384 compressor, with its 24 x 24
// (6, 4) and 16 x 16 (4, 4) compressors as the modules. Purely
// combinational.
module compressor_2x_nested #(
  parameter int unsigned M1 = 6,   // first-stage module is a (M1, M2) 2X-network
  parameter int unsigned M2 = 4,
  parameter int unsigned N1 = 4,   // second-stage module is a (N1, N2) 2X-network
  parameter int unsigned N2 = 4,
  parameter int unsigned W  = 8,   // payload width (assumed)
  parameter int unsigned SW = $clog2(M1*M2*N1*N2)
) (
  input  logic [SW-1:0]                 d_start,
  input  logic [M1*M2*N1*N2-1:0]        in_act,
  input  logic [W-1:0]                  in_data [M1*M2*N1*N2],
  output logic [M1*M2*N1*N2-1:0]        out_act,
  output logic [W-1:0]                  out_data [M1*M2*N1*N2],
  output logic [SW-1:0]                 next_start
);

  localparam int unsigned M  = M1 * M2;
  localparam int unsigned N  = N1 * N2;
  localparam int unsigned MW = $clog2(M);
  localparam int unsigned NW = $clog2(N);

  logic [MW-1:0] y;
  logic [NW-1:0] x;
  logic [MW-1:0] chain [N+1];
  logic [NW-1:0] ctl2  [M];
  logic [NW-1:0] last2_next;

  assign y        = MW'(d_start % SW'(M));
  assign x        = NW'(d_start / SW'(M));
  assign chain[0] = y;

  logic [M-1:0] s1_act   [N];
  logic [W-1:0] s1_data  [N][M];
  logic [N-1:0] s2i_act  [M];
  logic [W-1:0] s2i_data [M][N];
  logic [N-1:0] s2o_act  [M];
  logic [W-1:0] s2o_data [M][N];

  for (genvar i = 0; i < N; i++) begin : g_stage1
    logic [W-1:0] mod_in_data [M];
    for (genvar p = 0; p < M; p++) begin : g_in
      assign mod_in_data[p] = in_data[i*M + p];
    end
    compressor_2x #(.M(M1), .N(M2), .W(W), .SW(MW)) u_mod (
      .d_start    (chain[i]),
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
    compressor_2x #(.M(N1), .N(N2), .W(W), .SW(NW)) u_mod (
      .d_start    (ctl2[j]),
      .in_act     (s2i_act[j]),
      .in_data    (s2i_data[j]),
      .out_act    (s2o_act[j]),
      .out_data   (s2o_data[j]),
      .next_start (mod_next)
    );
    if (j == M - 1) begin : g_last
      assign last2_next = mod_next;
    end
    for (genvar b = 0; b < N; b++) begin : g_out
      assign out_act[b*M + j]  = s2o_act[j][b];
      assign out_data[b*M + j] = s2o_data[j][b];
    end
  end

  assign next_start = SW'(32'(last2_next) * M + 32'(chain[N]));

endmodule
