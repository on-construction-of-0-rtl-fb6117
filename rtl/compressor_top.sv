// compressor_top: the two compressors side by side, registered once per
// time slot.
//
// Baseline-swap side (16 ports by default): a cyclic 0-1 sorter made of
// iterative cells, its running-parity initializer, and the time-slot
// controller. In MODE_CYCLIC the k-th active input leaves on output
// (bs_d_start + k) mod 16, so bs_d_start = 0 makes it a plain concentrator.
// In MODE_FAIR slots A and B alternate so that upper and lower inputs take
// turns at precedence. bs_slot and bs_count report the slot kind and the
// number of active inputs of the slot that produced the registered outputs.
// bs_next_start is the network's out-band output D': in cyclic mode, the
// start address that continues where this slot's packets ended (feed it
// back to bs_d_start to distribute packets cyclically over the outputs).
//
// 2X-network side (384 ports by default): the nested 2X-network compressor,
// with 24 x 24 and 16 x 16 2X-networks as its modules. The k-th active input
// leaves on output (x_d_start + k) mod 384; x_next_start is the network's
// out-band output D'.
//
// Timing: all inputs are sampled and routed within one clock cycle, and the
// results are registered on the rising edge of clk, so the outputs appear one
// cycle after their inputs. Registering at the edges, and the synchronous
// active-low reset that clears the output registers and the slot state, are
// this design's choices; the document treats the networks as combinational.
module compressor_top
  import sorter_pkg::*;
#(
  parameter int unsigned LOG_N = 4,   // baseline-swap side: 2^LOG_N ports
  parameter int unsigned M1    = 6,   // 2X side: first-stage modules are (M1, M2) 2X-networks
  parameter int unsigned M2    = 4,
  parameter int unsigned N1    = 4,   // 2X side: second-stage modules are (N1, N2) 2X-networks
  parameter int unsigned N2    = 4,
  parameter int unsigned W     = 8,   // payload width (assumed)
  localparam int unsigned BN   = 1 << LOG_N,
  localparam int unsigned XN   = M1 * M2 * N1 * N2,
  localparam int unsigned XW   = $clog2(XN)
) (
  input  logic               clk,
  input  logic               rst_n,
  // baseline-swap compressor
  input  ctrl_mode_e         bs_mode,
  input  logic [LOG_N-1:0]   bs_d_start,
  input  logic [BN-1:0]      bs_in_act,
  input  logic [W-1:0]       bs_in_data  [BN],
  output logic [BN-1:0]      bs_out_act,
  output logic [W-1:0]       bs_out_data [BN],
  output slot_e              bs_slot,
  output logic [LOG_N:0]     bs_count,
  output logic [LOG_N-1:0]   bs_next_start,
  // nested 2X-network compressor
  input  logic [XW-1:0]      x_d_start,
  input  logic [XN-1:0]      x_in_act,
  input  logic [W-1:0]       x_in_data   [XN],
  output logic [XN-1:0]      x_out_act,
  output logic [W-1:0]       x_out_data  [XN],
  output logic [XW-1:0]      x_next_start
);

  // ---------------- baseline-swap side ----------------
  logic [LOG_N-1:0] bs_d_eff;
  logic             bs_invert;
  slot_e            bs_slot_now;
  logic [LOG_N:0]   bs_count_now;
  logic [BN-1:0]    bs_act_c;
  logic [W-1:0]     bs_data_c [BN];
  logic [LOG_N-1:0] bs_next_c;

  fairness_ctrl #(.LOG_N(LOG_N)) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .mode         (bs_mode),
    .d_start      (bs_d_start),
    .in_act       (bs_in_act),
    .d_eff        (bs_d_eff),
    .invert       (bs_invert),
    .slot         (bs_slot_now),
    .active_count (bs_count_now)
  );

  baseline_swap_compressor #(.LOG_N(LOG_N), .W(W)) u_bs (
    .d_start    (bs_d_eff),
    .invert     (bs_invert),
    .in_act     (bs_in_act),
    .in_data    (bs_in_data),
    .out_act    (bs_act_c),
    .out_data   (bs_data_c),
    .next_start (bs_next_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bs_out_act <= '0;
      bs_slot    <= SLOT_A;
      bs_count   <= '0;
      bs_next_start <= '0;
      for (int i = 0; i < BN; i++) bs_out_data[i] <= '0;
    end else begin
      bs_out_act  <= bs_act_c;
      bs_out_data <= bs_data_c;
      bs_slot     <= (bs_mode == MODE_FAIR) ? bs_slot_now : SLOT_A;
      bs_count    <= bs_count_now;
      bs_next_start <= bs_next_c;
    end
  end

  // ---------------- 2X-network side ----------------
  logic [XN-1:0] x_act_c;
  logic [W-1:0]  x_data_c [XN];
  logic [XW-1:0] x_next_c;

  compressor_2x_nested #(.M1(M1), .M2(M2), .N1(N1), .N2(N2), .W(W), .SW(XW)) u_2x (
    .d_start    (x_d_start),
    .in_act     (x_in_act),
    .in_data    (x_in_data),
    .out_act    (x_act_c),
    .out_data   (x_data_c),
    .next_start (x_next_c)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_out_act    <= '0;
      x_next_start <= '0;
      for (int i = 0; i < XN; i++) x_out_data[i] <= '0;
    end else begin
      x_out_act    <= x_act_c;
      x_out_data   <= x_data_c;
      x_next_start <= x_next_c;
    end
  end

endmodule
