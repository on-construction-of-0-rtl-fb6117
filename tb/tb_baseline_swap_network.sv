// tb_baseline_swap_network: feeds the 16-port network with initial running
// parities from the reference translation of a start address D and checks,
// for random and corner activity patterns, that every packet (activity bit
// and payload) reaches the output a compressor with start D must give it.
// The out-band output D' must be (D + active count) mod 16.
// Also checks that all-zero parities make it a plain 0-1 sorter.
module tb_baseline_swap_network;
  import tb_ref_pkg::*;
  localparam int LG = 4;
  localparam int N  = 1 << LG;
  localparam int W  = 8;
  int checks = 0, failures = 0;

  logic [N-2:0] rp;
  logic [N-1:0] in_act, out_act;
  logic [W-1:0] in_data [N];
  logic [W-1:0] out_data [N];
  logic [LG-1:0] nxt;

  baseline_swap_network #(.LOG_N(LG), .W(W)) dut (
    .rp_init(rp), .in_act(in_act), .in_data(in_data), .out_act(out_act), .out_data(out_data), .next_start(nxt));

  task automatic run_one(input int d, input logic [N-1:0] pat);
    bit act [];
    int dest [];
    act = new[N];
    for (int i = 0; i < N; i++) begin
      act[i]     = pat[i];
      in_data[i] = W'(i * 7 + 3);  // unique payload per input
    end
    in_act = pat;
    for (int i = 0; i < LG; i++)
      for (int j = 0; j < (1 << i); j++) rp[(1 << i) - 1 + j] = rp_ref(d, LG, i, j);
    #1;
    compress_ref(N, d, 1'b0, act, dest);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (out_act[dest[i]] !== pat[i] || out_data[dest[i]] !== W'(i * 7 + 3)) begin
        failures++;
        $display("FAIL D=%0d pat=%h input %0d expected at output %0d", d, pat, i, dest[i]);
      end
    end
    checks++;
    if (nxt !== LG'((d + $countones(pat)) % N)) begin
      failures++;
      $display("FAIL D=%0d pat=%h next_start=%0d", d, pat, nxt);
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
    for (int d = 0; d < N; d++) begin
      run_one(d, '0);
      run_one(d, '1);
      run_one(d, 16'h0001);
      run_one(d, 16'h8000);
      for (int t = 0; t < 40; t++) run_one(d, N'($urandom));
    end
    // all-zero running parities: plain 0-1 sorter
    for (int t = 0; t < 20; t++) begin
      logic [N-1:0] pat;
      int k;
      pat    = N'($urandom);
      in_act = pat;
      rp     = '0;
      #1;
      k = $countones(pat);
      checks++;
      if (out_act !== N'((32'(1) << k) - 1)) begin
        failures++;
        $display("FAIL sort pat=%h out=%h", pat, out_act);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
