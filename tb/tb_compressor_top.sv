// tb_compressor_top: end-to-end test of compressor_top at its default sizes
// (16-port baseline-swap compressor, 384-port nested 2X-network).
//
// Each clock cycle is one time slot. New inputs are applied after a falling
// edge; the registered outputs are checked one cycle later against a
// reference that knows only the definition of a compressor and the slot
// rules. The baseline-swap side runs phases of cyclic mode (start 0 and
// random starts) and fairness mode. The 2X side runs as a distributor: each
// slot's start address is the previous slot's D' output.
//
// Mechanisms counted (each must occur at least once): plain 0-1 sort
// (start 0), cyclic start other than 0, wrap-around past the last output,
// fairness slot A, fairness slot B, a slot B in which a lower input wins one
// of the first 8 outputs that it loses in slot A (overflow of an 8-output
// concentration), all inputs active, no input active, 16-port start address
// taken from the previous slot's D', 2X wrap-around and 2X start address
// taken from D'.
module tb_compressor_top;
  import sorter_pkg::*;
  import tb_ref_pkg::*;
  localparam int LG = 4;
  localparam int BN = 16;
  localparam int XN = 384;
  localparam int W  = 8;
  localparam int NOUT = 8;   // outputs in use for the overflow / fairness count

  int checks = 0, failures = 0;
  int cycles = 0;
  int n_sort = 0, n_cyclic = 0, n_wrap = 0, n_slot_a = 0, n_slot_b = 0;
  int n_fair_win = 0, n_full = 0, n_empty = 0, n_x_wrap = 0, n_x_chain = 0, n_bs_chain = 0;

  logic clk = 1'b0, rst_n;
  ctrl_mode_e bs_mode;
  logic [LG-1:0] bs_d_start;
  logic [BN-1:0] bs_in_act, bs_out_act;
  logic [W-1:0]  bs_in_data [BN];
  logic [W-1:0]  bs_out_data [BN];
  slot_e bs_slot;
  logic [LG:0] bs_count;
  logic [LG-1:0] bs_next_start;
  logic [8:0] x_d_start, x_next_start;
  logic [XN-1:0] x_in_act, x_out_act;
  logic [W-1:0] x_in_data [XN];
  logic [W-1:0] x_out_data [XN];

  compressor_top dut (
    .clk(clk), .rst_n(rst_n),
    .bs_mode(bs_mode), .bs_d_start(bs_d_start), .bs_in_act(bs_in_act), .bs_in_data(bs_in_data),
    .bs_out_act(bs_out_act), .bs_out_data(bs_out_data), .bs_slot(bs_slot), .bs_count(bs_count), .bs_next_start(bs_next_start),
    .x_d_start(x_d_start), .x_in_act(x_in_act), .x_in_data(x_in_data),
    .x_out_act(x_out_act), .x_out_data(x_out_data), .x_next_start(x_next_start));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected values for the slot whose inputs were applied last
  int    exp_bs_dest [];
  bit    exp_bs_act  [BN];
  logic [W-1:0] exp_bs_data [BN];
  slot_e exp_slot;
  int    exp_count;
  int    exp_bs_next;
  int    exp_x_dest [];
  bit    exp_x_act  [XN];
  logic [W-1:0] exp_x_data [XN];
  int    exp_x_next;

  task automatic check_outputs();
    for (int i = 0; i < BN; i++) begin
      checks++;
      if (bs_out_act[exp_bs_dest[i]] !== exp_bs_act[i] || bs_out_data[exp_bs_dest[i]] !== exp_bs_data[i]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d bs input %0d expected at %0d", cycles, i, exp_bs_dest[i]);
      end
    end
    checks += 2;
    if (bs_slot !== exp_slot) begin failures++; $display("FAIL cycle %0d slot", cycles); end
    if (bs_count !== (LG+1)'(exp_count)) begin failures++; $display("FAIL cycle %0d count", cycles); end
    checks++;
    if (bs_next_start !== LG'(exp_bs_next)) begin failures++; $display("FAIL cycle %0d bs D'", cycles); end
    for (int i = 0; i < XN; i++) begin
      checks++;
      if (x_out_act[exp_x_dest[i]] !== exp_x_act[i] || x_out_data[exp_x_dest[i]] !== exp_x_data[i]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d 2x input %0d expected at %0d", cycles, i, exp_x_dest[i]);
      end
    end
    checks++;
    if (x_next_start !== 9'(exp_x_next)) begin failures++; $display("FAIL cycle %0d D'", cycles); end
  endtask

  // fairness bookkeeping: which inputs reached the first NOUT outputs
  bit won_a [BN];

  initial begin
    slot_e model_slot;
    bit have_prev;
    int x_d;
    rst_n     = 1'b0;
    bs_mode   = MODE_CYCLIC;
    bs_d_start = '0;
    bs_in_act = '0;
    x_in_act  = '0;
    x_d_start = '0;
    for (int i = 0; i < BN; i++) bs_in_data[i] = '0;
    for (int i = 0; i < XN; i++) x_in_data[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // outputs after reset must be cleared
    checks++;
    if (bs_out_act !== '0 || x_out_act !== '0) begin failures++; $display("FAIL reset"); end
    model_slot = SLOT_A;
    have_prev  = 1'b0;
    x_d        = 0;
    for (int t = 0; t < 400; t++) begin
      bit act [];
      bit xact [];
      bit inv;
      int dv, k;
      int phase;
      phase = (t / 50) % 4;   // 0: sort, 1: cyclic, 2,3: fairness
      bs_mode = (phase >= 2) ? MODE_FAIR : MODE_CYCLIC;
      // baseline-swap inputs
      act = new[BN];
      bs_in_act = BN'($urandom) | BN'($urandom);   // fairly dense, often over NOUT
      if (t % 50 == 7)  bs_in_act = '1;
      if (t % 50 == 11) bs_in_act = '0;
      for (int i = 0; i < BN; i++) begin
        act[i] = bs_in_act[i];
        bs_in_data[i] = W'($urandom);
        exp_bs_act[i]  = bs_in_act[i];
        exp_bs_data[i] = bs_in_data[i];
      end
      k = $countones(bs_in_act);
      bs_d_start = (phase == 0) ? '0 : LG'($urandom);
      // cyclic phase, odd slots: continue where the previous slot ended
      if (phase == 1 && t % 2 == 1) begin
        bs_d_start = bs_next_start;
        n_bs_chain++;
      end
      if (bs_mode == MODE_CYCLIC) begin
        dv  = int'(bs_d_start);
        inv = 1'b0;
        exp_slot = SLOT_A;
        if (dv == 0) n_sort++; else n_cyclic++;
        if (k > 0 && dv + k > BN) n_wrap++;
      end else begin
        exp_slot = model_slot;
        if (model_slot == SLOT_A) begin dv = 0; inv = 1'b0; n_slot_a++; end
        else begin dv = k % BN; inv = 1'b1; n_slot_b++; end
      end
      if (k == BN) n_full++;
      if (k == 0)  n_empty++;
      exp_count = k;
      exp_bs_next = (dv + (inv ? BN - k : k)) % BN;
      compress_ref(BN, dv, inv, act, exp_bs_dest);
      // fairness: in slot B, does an input win an output in 0..NOUT-1 that
      // the same pattern would not give it in slot A?
      if (bs_mode == MODE_FAIR && model_slot == SLOT_B && k > NOUT) begin
        int dest_a [];
        compress_ref(BN, 0, 1'b0, act, dest_a);
        for (int i = 0; i < BN; i++)
          if (act[i] && exp_bs_dest[i] < NOUT && dest_a[i] >= NOUT) begin
            n_fair_win++;
            break;
          end
      end
      if (bs_mode == MODE_FAIR) model_slot = (model_slot == SLOT_A) ? SLOT_B : SLOT_A;
      else                      model_slot = SLOT_A;
      // 2X side: distributor, start address is the previous D'
      xact = new[XN];
      for (int i = 0; i < XN; i++) begin
        x_in_act[i]  = 1'($urandom_range(3) == 0);
        x_in_data[i] = W'($urandom);
        xact[i]       = x_in_act[i];
        exp_x_act[i]  = x_in_act[i];
        exp_x_data[i] = x_in_data[i];
      end
      if (t == 3) x_in_act = '1;
      if (t == 3) for (int i = 0; i < XN; i++) xact[i] = 1'b1;
      if (t == 3) for (int i = 0; i < XN; i++) exp_x_act[i] = 1'b1;
      x_d_start = 9'(x_d);
      if (have_prev) n_x_chain++;
      compress_ref(XN, x_d, 1'b0, xact, exp_x_dest);
      exp_x_next = (x_d + $countones(x_in_act)) % XN;
      if (x_d + $countones(x_in_act) > XN) n_x_wrap++;
      @(negedge clk);
      check_outputs();
      // the next slot starts where this one ended (read back from the DUT)
      x_d       = int'(x_next_start);
      have_prev = 1'b1;
    end
    checks += 11;
    if (n_bs_chain == 0) begin failures++; $display("FAIL never: 16-port start from D'"); end
    if (n_sort == 0)     begin failures++; $display("FAIL never: plain sort"); end
    if (n_cyclic == 0)   begin failures++; $display("FAIL never: cyclic start"); end
    if (n_wrap == 0)     begin failures++; $display("FAIL never: wrap-around"); end
    if (n_slot_a == 0)   begin failures++; $display("FAIL never: slot A"); end
    if (n_slot_b == 0)   begin failures++; $display("FAIL never: slot B"); end
    if (n_fair_win == 0) begin failures++; $display("FAIL never: lower input favoured"); end
    if (n_full == 0)     begin failures++; $display("FAIL never: all active"); end
    if (n_empty == 0)    begin failures++; $display("FAIL never: none active"); end
    if (n_x_wrap == 0)   begin failures++; $display("FAIL never: 2X wrap-around"); end
    if (n_x_chain == 0)  begin failures++; $display("FAIL never: 2X start from D'"); end
    $display("mechanisms: sort=%0d cyclic=%0d wrap=%0d slotA=%0d slotB=%0d lower_wins=%0d full=%0d empty=%0d x_wrap=%0d x_chain=%0d bs_chain=%0d",
             n_sort, n_cyclic, n_wrap, n_slot_a, n_slot_b, n_fair_win, n_full, n_empty, n_x_wrap, n_x_chain, n_bs_chain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
