// tb_fairness_ctrl: checks the per-slot start address and polarity. In
// cyclic mode they must follow d_start with no inversion and the slot must
// stay A; in fairness mode slots must alternate A, B, A, ... starting with A
// after reset or after leaving cyclic mode, with D = 0 in slot A and D = the
// number of active inputs (mod 16), inverted, in slot B.
module tb_fairness_ctrl;
  import sorter_pkg::*;
  localparam int LG = 4;
  localparam int N  = 1 << LG;
  int checks = 0, failures = 0;
  int cycles = 0;

  logic clk = 1'b0, rst_n;
  ctrl_mode_e mode;
  logic [LG-1:0] d_start, d_eff;
  logic [N-1:0] in_act;
  logic invert;
  slot_e slot;
  logic [LG:0] cnt;

  fairness_ctrl #(.LOG_N(LG)) dut (
    .clk(clk), .rst_n(rst_n), .mode(mode), .d_start(d_start), .in_act(in_act),
    .d_eff(d_eff), .invert(invert), .slot(slot), .active_count(cnt));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (mode=%0d slot=%0d d_eff=%0d inv=%0b cnt=%0d)", what, mode, slot, d_eff, invert, cnt);
    end
  endtask

  initial begin
    slot_e exp_slot;
    rst_n   = 1'b0;
    mode    = MODE_FAIR;
    d_start = '0;
    in_act  = '0;
    @(negedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    exp_slot = SLOT_A;
    for (int phase = 0; phase < 6; phase++) begin
      mode = (phase % 2 == 0) ? MODE_FAIR : MODE_CYCLIC;
      for (int t = 0; t < 50; t++) begin
        int k;
        in_act  = N'($urandom);
        if (t == 3) in_act = '1;   // count of 16 wraps to start address 0
        d_start = LG'($urandom);
        #1;
        k = $countones(in_act);
        chk(cnt == (LG+1)'(k), "active count");
        if (mode == MODE_CYCLIC) begin
          chk(d_eff == d_start && !invert, "cyclic mode passes d_start");
        end else begin
          chk(slot == exp_slot, "slot alternation");
          if (exp_slot == SLOT_A) chk(d_eff == 0 && !invert, "slot A control");
          else                    chk(d_eff == LG'(k % N) && invert, "slot B control");
        end
        @(negedge clk);
        if (mode == MODE_FAIR) exp_slot = (exp_slot == SLOT_A) ? SLOT_B : SLOT_A;
        else                   exp_slot = SLOT_A;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
