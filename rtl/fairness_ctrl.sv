// fairness_ctrl: chooses, for every time slot (clock cycle), the start
// address and polarity with which the baseline-swap compressor is driven.
//
// MODE_CYCLIC: the compressor is a cyclic 0-1 sorter. The start address comes
// from d_start and the running parities are not inverted.
// MODE_FAIR: two kinds of slot alternate, so that upper and lower inputs take
// turns at precedence when more packets arrive than the outputs in use can
// take:
//   slot A: start address 0, parities as computed. Active packets are
//           stacked from output 0 downward in input order, so the upper
//           inputs win.
//   slot B: start address k = number of active inputs (mod 2^LOG_N), all
//           parities complemented. Active packets again fill outputs
//           0..k-1, but the last active input is on output 0, so the lower
//           inputs win.
// The alternation and both slot settings follow the document. The mode
// encoding, the reset state (slot A) and holding slot A while in
// MODE_CYCLIC are this design's choices.
//
// Timing: d_eff, invert and active_count are combinational in the current
// slot's activity bits; the slot register advances on each rising clk edge
// while in MODE_FAIR. Reset is active-low and synchronous.
module fairness_ctrl
  import sorter_pkg::*;
#(
  parameter int unsigned LOG_N = 4  // 2^LOG_N ports (16)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  ctrl_mode_e              mode,
  input  logic [LOG_N-1:0]        d_start,       // used in MODE_CYCLIC
  input  logic [(1<<LOG_N)-1:0]   in_act,        // activity bits of this slot
  output logic [LOG_N-1:0]        d_eff,         // start address applied this slot
  output logic                    invert,        // complement running parities this slot
  output slot_e                   slot,          // kind of slot (meaningful in MODE_FAIR)
  output logic [LOG_N:0]          active_count   // number of active inputs this slot
);

  localparam int unsigned N = 1 << LOG_N;

  always_comb begin
    active_count = '0;
    for (int i = 0; i < N; i++) active_count += (LOG_N+1)'(in_act[i]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                 slot <= SLOT_A;
    else if (mode == MODE_FAIR) slot <= (slot == SLOT_A) ? SLOT_B : SLOT_A;
    else                        slot <= SLOT_A;
  end

  always_comb begin
    if (mode == MODE_CYCLIC) begin
      d_eff  = d_start;
      invert = 1'b0;
    end else if (slot == SLOT_A) begin
      d_eff  = '0;
      invert = 1'b0;
    end else begin
      d_eff  = active_count[LOG_N-1:0];
      invert = 1'b1;
    end
  end

endmodule
