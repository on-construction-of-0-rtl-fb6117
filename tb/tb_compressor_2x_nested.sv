// tb_compressor_2x_nested: the default 384-port nested 2X-network compressor
// (24 x 24 and 16 x 16 2X-networks as modules). Random activity patterns of
// several densities and random start addresses; each packet must reach its
// compressor destination and D' must equal (D + active count) mod 384.
module tb_compressor_2x_nested;
  import tb_ref_pkg::*;
  localparam int W = 8;
  localparam int P = 384;
  int checks = 0, failures = 0;

  logic [8:0]   d, nx;
  logic [P-1:0] a, o;
  logic [W-1:0] di [P];
  logic [W-1:0] dout [P];

  compressor_2x_nested dut (
    .d_start(d), .in_act(a), .in_data(di), .out_act(o), .out_data(dout), .next_start(nx));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 60; t++) begin
      bit act [];
      int dst [];
      int dv;
      int dens;
      act  = new[P];
      dv   = $urandom_range(P - 1);
      dens = t % 5;   // 0 = empty .. 4 = full, else random density
      for (int i = 0; i < P; i++) begin
        case (dens)
          0: a[i] = (t == 0) ? 1'b0 : 1'($urandom_range(7) == 0);
          4: a[i] = (t == 4) ? 1'b1 : 1'($urandom_range(7) != 0);
          default: a[i] = 1'($urandom);
        endcase
        act[i] = a[i];
        di[i]  = W'($urandom);
      end
      d = 9'(dv);
      #1;
      compress_ref(P, dv, 1'b0, act, dst);
      for (int i = 0; i < P; i++) begin
        checks++;
        if (o[dst[i]] !== a[i] || dout[dst[i]] !== di[i]) begin
          failures++;
          if (failures < 10) $display("FAIL D=%0d input %0d -> expected %0d", dv, i, dst[i]);
        end
      end
      checks++;
      if (nx !== 9'((dv + $countones(a)) % P)) begin
        failures++; $display("FAIL D' = %0d for D=%0d", nx, dv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
