// tb_iterative_cell: drives all eight combinations of the two activity bits
// and the running parity, with random payloads, and checks the routing and
// the parity passed on against the cell's switching rule.
module tb_iterative_cell;
  localparam int W = 8;
  int checks = 0, failures = 0;
  logic rp_in, a0, a1, oa0, oa1, rp_out;
  logic [W-1:0] d0, d1, od0, od1;

  iterative_cell #(.W(W)) dut (
    .rp_in(rp_in), .act0(a0), .data0(d0), .act1(a1), .data1(d1),
    .act_out0(oa0), .data_out0(od0), .act_out1(oa1), .data_out1(od1), .rp_out(rp_out));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: rp=%0b a0=%0b a1=%0b", what, rp_in, a0, a1);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 8; v++) begin
        bit exp_cross;
        {rp_in, a1, a0} = 3'(v);
        d0 = 8'($urandom);
        d1 = 8'($urandom);
        #1;
        // expected state from the rule: single active input goes to output
        // rp; two actives: exp_cross iff rp; two idles: the first idle goes to
        // output !rp (idle compression in reverse order).
        if (a0 && !a1)      exp_cross = rp_in;
        else if (!a0 && a1) exp_cross = !rp_in;
        else if (a0 && a1)  exp_cross = rp_in;
        else                exp_cross = !rp_in;
        check(rp_out == (rp_in ^ a0 ^ a1), "rp_out");
        if (exp_cross) begin
          check(oa0 == a1 && od0 == d1 && oa1 == a0 && od1 == d0, "cross routing");
        end else begin
          check(oa0 == a0 && od0 == d0 && oa1 == a1 && od1 == d1, "bar routing");
        end
        if (a0 ^ a1) check((rp_in ? oa1 : oa0) == 1'b1, "single active on output rp");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
