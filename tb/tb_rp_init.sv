// tb_rp_init: checks every initial running parity from the explicit formulas
// against a recursive translation of the start address (halving it stage by
// stage into the start addresses of the upper and lower sub-compressors).
// Exhaustive over D for 16 ports; random D for a 128-port instance, which
// also holds the two worked expressions RP(4,10) and RP(6,3).
module tb_rp_init;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0]   d4;
  logic [14:0]  rp4;
  logic [6:0]   d7;
  logic [126:0] rp7;

  rp_init #(.LOG_N(4)) dut4 (.d(d4), .rp(rp4));
  rp_init #(.LOG_N(7)) dut7 (.d(d7), .rp(rp7));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 16; d++) begin
      d4 = 4'(d);
      #1;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < (1 << i); j++) begin
          checks++;
          if (rp4[(1 << i) - 1 + j] !== rp_ref(d, 4, i, j)) begin
            failures++;
            $display("FAIL LOG_N=4 D=%0d RP(%0d,%0d)=%0b", d, i, j, rp4[(1 << i) - 1 + j]);
          end
        end
    end
    for (int t = 0; t < 200; t++) begin
      bit [6:0] dv;
      dv = 7'($urandom);
      d7 = dv;
      #1;
      for (int i = 0; i < 7; i++)
        for (int j = 0; j < (1 << i); j++) begin
          checks++;
          if (rp7[(1 << i) - 1 + j] !== rp_ref(int'(dv), 7, i, j)) begin
            failures++;
            $display("FAIL LOG_N=7 D=%0d RP(%0d,%0d)", dv, i, j);
          end
        end
      // worked expressions, evaluated left to right
      checks++;
      if (rp7[15 + 10] !== ((((dv[1] & dv[2]) | dv[3])) ^ dv[4])) begin
        failures++; $display("FAIL RP(4,10) D=%0d", dv);
      end
      checks++;
      if (rp7[63 + 3] !== (((((((dv[0] | dv[1]) | dv[2]) | dv[3]) & dv[4]) & dv[5])) ^ dv[6])) begin
        failures++; $display("FAIL RP(6,3) D=%0d", dv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
