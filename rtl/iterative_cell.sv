// iterative_cell: 2x2 switching cell steered by a running parity.
//
// Each input carries an activity bit (1 = active packet, 0 = idle) and a
// W-bit payload that trails it. The cell also receives the running parity
// rp_in, the number of active inputs above it in the same stage plus the
// chain's initial value, modulo 2, and passes rp_out = rp_in ^ act0 ^ act1 to
// the next cell of the chain.
//
// Switching rule: when exactly one input is active it leaves on output rp_in
// (0 = upper, 1 = lower); when both are active the cell is in cross state for
// rp_in = 1 and bar state for rp_in = 0. All of this follows the cell
// described with the recursive 0-1 sorter. The cell's bar control is
// bar = act0 ^ rp_in. That also settles the case of two idle inputs (cross for
// rp_in = 0), which makes idle packets leave in the order the document states
// for them: compressed, with a decreasing address mapping. That reading of the
// control for two idle inputs is this design's own.
//
// Purely combinational; no clock.
module iterative_cell #(
  parameter int unsigned W = 8  // payload width (assumed)
) (
  input  logic         rp_in,
  input  logic         act0,
  input  logic [W-1:0] data0,
  input  logic         act1,
  input  logic [W-1:0] data1,
  output logic         act_out0,
  output logic [W-1:0] data_out0,
  output logic         act_out1,
  output logic [W-1:0] data_out1,
  output logic         rp_out
);

  logic bar;  // 1 = bar (straight through), 0 = cross

  always_comb begin
    bar    = act0 ^ rp_in;
    rp_out = rp_in ^ act0 ^ act1;
    if (bar) begin
      act_out0  = act0;
      data_out0 = data0;
      act_out1  = act1;
      data_out1 = data1;
    end else begin
      act_out0  = act1;
      data_out0 = data1;
      act_out1  = act0;
      data_out1 = data0;
    end
  end

endmodule
