// tb_compressor_2x: checks the (6, 4) 24-port and the (4, 4) 16-port
// 2X-network compressors. Directed cases: the 24-port example (D = 20,
// packets on inputs 0, 7, 13, 20, 21 must reach outputs 20, 21, 22, 23, 0)
// and the 16-port example (D = 11). Then random patterns and start
// addresses: every packet must reach its compressor destination and the
// out-band output D' must be the start address for the next packet,
// (D + number of active inputs) mod (M*N). The two 8-port constructions,
// (2, 4) and (4, 2), are checked exhaustively over all patterns and starts.
module tb_compressor_2x;
  import tb_ref_pkg::*;
  localparam int W = 8;
  int checks = 0, failures = 0;

  logic [4:0]  d24, n24;
  logic [23:0] a24, o24;
  logic [W-1:0] di24 [24];
  logic [W-1:0] do24 [24];
  logic [3:0]  d16, n16;
  logic [15:0] a16, o16;
  logic [W-1:0] di16 [16];
  logic [W-1:0] do16 [16];

  compressor_2x #(.M(6), .N(4), .W(W)) dut24 (
    .d_start(d24), .in_act(a24), .in_data(di24), .out_act(o24), .out_data(do24), .next_start(n24));
  compressor_2x #(.M(4), .N(4), .W(W)) dut16 (
    .d_start(d16), .in_act(a16), .in_data(di16), .out_act(o16), .out_data(do16), .next_start(n16));

  logic [2:0] d8a, n8a, d8b, n8b;
  logic [7:0] a8, o8a, o8b;
  logic [W-1:0] di8 [8];
  logic [W-1:0] do8a [8];
  logic [W-1:0] do8b [8];

  compressor_2x #(.M(2), .N(4), .W(W)) dut8a (
    .d_start(d8a), .in_act(a8), .in_data(di8), .out_act(o8a), .out_data(do8a), .next_start(n8a));
  compressor_2x #(.M(4), .N(2), .W(W)) dut8b (
    .d_start(d8b), .in_act(a8), .in_data(di8), .out_act(o8b), .out_data(do8b), .next_start(n8b));

  task automatic check8(input int dv);
    bit act [];
    int dst [];
    act = new[8];
    for (int i = 0; i < 8; i++) begin act[i] = a8[i]; di8[i] = W'(i + 200); end
    d8a = 3'(dv);
    d8b = 3'(dv);
    #1;
    compress_ref(8, dv, 1'b0, act, dst);
    for (int i = 0; i < 8; i++) begin
      checks += 2;
      if (o8a[dst[i]] !== a8[i] || do8a[dst[i]] !== W'(i + 200)) begin
        failures++; $display("FAIL (2,4) D=%0d pat=%b input %0d", dv, a8, i);
      end
      if (o8b[dst[i]] !== a8[i] || do8b[dst[i]] !== W'(i + 200)) begin
        failures++; $display("FAIL (4,2) D=%0d pat=%b input %0d", dv, a8, i);
      end
    end
    checks += 2;
    if (n8a !== 3'((dv + $countones(a8)) % 8)) begin failures++; $display("FAIL (2,4) D'"); end
    if (n8b !== 3'((dv + $countones(a8)) % 8)) begin failures++; $display("FAIL (4,2) D'"); end
  endtask

  task automatic check24(input int dv);
    bit act [];
    int dst [];
    act = new[24];
    for (int i = 0; i < 24; i++) begin act[i] = a24[i]; di24[i] = W'(i + 100); end
    d24 = 5'(dv);
    #1;
    compress_ref(24, dv, 1'b0, act, dst);
    for (int i = 0; i < 24; i++) begin
      checks++;
      if (o24[dst[i]] !== a24[i] || do24[dst[i]] !== W'(i + 100)) begin
        failures++; $display("FAIL 24-port D=%0d pat=%h input %0d -> expected %0d", dv, a24, i, dst[i]);
      end
    end
    checks++;
    if (n24 !== 5'((dv + $countones(a24)) % 24)) begin
      failures++; $display("FAIL 24-port D' = %0d for D=%0d k=%0d", n24, dv, $countones(a24));
    end
  endtask

  task automatic check16(input int dv);
    bit act [];
    int dst [];
    act = new[16];
    for (int i = 0; i < 16; i++) begin act[i] = a16[i]; di16[i] = W'(i + 50); end
    d16 = 4'(dv);
    #1;
    compress_ref(16, dv, 1'b0, act, dst);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (o16[dst[i]] !== a16[i] || do16[dst[i]] !== W'(i + 50)) begin
        failures++; $display("FAIL 16-port D=%0d pat=%h input %0d", dv, a16, i);
      end
    end
    checks++;
    if (n16 !== 4'((dv + $countones(a16)) % 16)) begin
      failures++; $display("FAIL 16-port D' = %0d for D=%0d", n16, dv);
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
    // 24-port example
    a24 = '0;
    a24[0] = 1'b1; a24[7] = 1'b1; a24[13] = 1'b1; a24[20] = 1'b1; a24[21] = 1'b1;
    check24(20);
    checks++;
    if (do24[20] !== W'(100) || do24[21] !== W'(107) || do24[22] !== W'(113) ||
        do24[23] !== W'(120) || do24[0] !== W'(121)) begin
      failures++; $display("FAIL 24-port worked example");
    end
    // 16-port example, D = 11
    a16 = 16'h3c0f;
    check16(11);
    for (int p = 0; p < 256; p++)
      for (int dv = 0; dv < 8; dv++) begin
        a8 = 8'(p);
        check8(dv);
      end
    for (int t = 0; t < 400; t++) begin
      a24 = 24'($urandom);
      a16 = 16'($urandom);
      if (t == 0) begin a24 = '1; a16 = '1; end
      check24($urandom_range(23));
      check16($urandom_range(15));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
