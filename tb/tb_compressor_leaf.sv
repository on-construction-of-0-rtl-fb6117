// tb_compressor_leaf: random activity patterns and start addresses on a
// 6-port and a 4-port module; every packet must land where the compressor
// definition puts it, and next_start must be (start + active count) mod M.
module tb_compressor_leaf;
  import tb_ref_pkg::*;
  localparam int W = 8;
  int checks = 0, failures = 0;

  logic [2:0] s6, n6;
  logic [5:0] a6, o6;
  logic [W-1:0] di6 [6];
  logic [W-1:0] do6 [6];
  logic [1:0] s4, n4;
  logic [3:0] a4, o4;
  logic [W-1:0] di4 [4];
  logic [W-1:0] do4 [4];

  compressor_leaf #(.M(6), .W(W)) dut6 (
    .start(s6), .in_act(a6), .in_data(di6), .out_act(o6), .out_data(do6), .next_start(n6));
  compressor_leaf #(.M(4), .W(W)) dut4 (
    .start(s4), .in_act(a4), .in_data(di4), .out_act(o4), .out_data(do4), .next_start(n4));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      bit act6 [], act4 [];
      int dst6 [], dst4 [];
      int st6, st4;
      act6 = new[6];
      act4 = new[4];
      st6 = $urandom_range(5);
      st4 = $urandom_range(3);
      s6 = 3'(st6);
      s4 = 2'(st4);
      a6 = 6'($urandom);
      a4 = 4'($urandom);
      if (t == 0) begin a6 = '1; a4 = '1; end
      if (t == 1) begin a6 = '0; a4 = '0; end
      for (int i = 0; i < 6; i++) begin di6[i] = W'(16 + i); act6[i] = a6[i]; end
      for (int i = 0; i < 4; i++) begin di4[i] = W'(32 + i); act4[i] = a4[i]; end
      #1;
      compress_ref(6, st6, 1'b0, act6, dst6);
      compress_ref(4, st4, 1'b0, act4, dst4);
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (o6[dst6[i]] !== a6[i] || do6[dst6[i]] !== W'(16 + i)) begin
          failures++; $display("FAIL M=6 start=%0d pat=%b input %0d", st6, a6, i);
        end
      end
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (o4[dst4[i]] !== a4[i] || do4[dst4[i]] !== W'(32 + i)) begin
          failures++; $display("FAIL M=4 start=%0d pat=%b input %0d", st4, a4, i);
        end
      end
      checks += 2;
      if (n6 !== 3'((st6 + $countones(a6)) % 6)) begin failures++; $display("FAIL next_start M=6"); end
      if (n4 !== 2'((st4 + $countones(a4)) % 4)) begin failures++; $display("FAIL next_start M=4"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
