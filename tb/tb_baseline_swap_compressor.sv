// tb_baseline_swap_compressor: checks the cyclic 0-1 sorter for every start
// address, both parity polarities and random activity patterns, at the
// default 16 ports. An 8-port instance replays the reverse-control example:
// packets on inputs 0, 1, 2, 5 and 6, start address 5 (their number),
// parities complemented, which must put input 6 on output 0, input 5 on
// output 1, input 2 on output 2, input 1 on output 3 and input 0 on output 4.
// D' must follow the packets compressed upward (active ones, or idle ones
// when inverted).
module tb_baseline_swap_compressor;
  import tb_ref_pkg::*;
  localparam int LG = 4;
  localparam int N  = 1 << LG;
  localparam int W  = 8;
  int checks = 0, failures = 0;

  logic [LG-1:0] d;
  logic          inv;
  logic [N-1:0]  in_act, out_act;
  logic [W-1:0]  in_data [N];
  logic [W-1:0]  out_data [N];
  logic [LG-1:0] nxt;

  baseline_swap_compressor #(.LOG_N(LG), .W(W)) dut (
    .d_start(d), .invert(inv), .in_act(in_act), .in_data(in_data),
    .out_act(out_act), .out_data(out_data), .next_start(nxt));

  logic [2:0] d8;
  logic       inv8;
  logic [7:0] in_act8, out_act8;
  logic [W-1:0] in_data8 [8];
  logic [W-1:0] out_data8 [8];

  baseline_swap_compressor #(.LOG_N(3), .W(W)) dut8 (
    .d_start(d8), .invert(inv8), .in_act(in_act8), .in_data(in_data8),
    .out_act(out_act8), .out_data(out_data8), .next_start());

  task automatic run_one(input int dv, input bit iv, input logic [N-1:0] pat);
    bit act [];
    int dest [];
    act = new[N];
    for (int i = 0; i < N; i++) begin
      act[i]     = pat[i];
      in_data[i] = W'($urandom);
    end
    in_act = pat;
    d      = LG'(dv);
    inv    = iv;
    #1;
    compress_ref(N, dv, iv, act, dest);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (out_act[dest[i]] !== pat[i] || out_data[dest[i]] !== in_data[i]) begin
        failures++;
        $display("FAIL D=%0d inv=%0b pat=%h input %0d expected at %0d", dv, iv, pat, i, dest[i]);
      end
    end
    checks++;
    if (nxt !== LG'((dv + (iv ? N - $countones(pat) : $countones(pat))) % N)) begin
      failures++;
      $display("FAIL D=%0d inv=%0b pat=%h next_start=%0d", dv, iv, pat, nxt);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int dv = 0; dv < N; dv++)
      for (int iv = 0; iv < 2; iv++) begin
        run_one(dv, 1'(iv), '0);
        run_one(dv, 1'(iv), '1);
        for (int t = 0; t < 30; t++) run_one(dv, 1'(iv), N'($urandom));
      end
    // 8-port reverse-control example
    in_act8 = 8'b0110_0111;
    for (int i = 0; i < 8; i++) in_data8[i] = W'(8'hA0 + i);
    d8   = 3'd5;
    inv8 = 1'b1;
    #1;
    checks++;
    if (out_act8 !== 8'b0001_1111 || out_data8[0] !== 8'hA6 || out_data8[1] !== 8'hA5 ||
        out_data8[2] !== 8'hA2 || out_data8[3] !== 8'hA1 || out_data8[4] !== 8'hA0) begin
      failures++;
      $display("FAIL reverse-control example: act=%b", out_act8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
