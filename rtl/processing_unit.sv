// processing_unit: the add/shift processing unit (PU) attached to one group
// of 4 memory columns.
//
// A 4-input adder counts the edge flags read from the PU's 4 columns; a
// W-bit 2-input adder adds that count to the PU's sum. A selector then
// chooses what the sum register takes:
//   PU_ADD   (S = 1): sum + count of the 4 flags          ("add")
//   PU_SHIFT (S = 0): the sum of the PU on the left, or 0
//                     when this PU's input mask is 0        ("shift right")
//   PU_HOLD         : the sum is kept (no clock edge for the PU)
// The register output goes straight to the next PU on the right (shift_out,
// not masked). The down output, to the OR selector, is the sum ANDed with
// the PU's output mask, so only the last PU of the region of interest
// drives a value there.
//
// This follows the document's PU structure at the prototype chip's
// 8-bit width; sums wrap modulo 2**W. The hold state and the synchronous
// active-low reset to 0 are this design's choices.
module processing_unit
  import edge_cache_pkg::*;
#(
  parameter int unsigned W    = 8,     // sum width
  parameter int unsigned UNIT = 4      // flags per PU
) (
  input  logic            clk,
  input  logic            rst_n,
  input  pu_op_e          op,
  input  logic [UNIT-1:0] flags,       // edge flags from the memory
  input  logic [W-1:0]    shift_in,    // sum of the PU on the left
  input  logic            inmsk,       // 0: this PU starts the region
  input  logic            outmsk,      // 1: this PU ends the region
  output logic [W-1:0]    shift_out,   // own sum, to the PU on the right
  output logic [W-1:0]    down         // masked sum, to the OR selector
);
  logic [W-1:0] sum_q, count, added, shifted;

  always_comb begin
    count = '0;
    for (int i = 0; i < UNIT; i++) count += W'(flags[i]);
    added   = sum_q + count;
    shifted = inmsk ? shift_in : '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)              sum_q <= '0;
    else if (op == PU_ADD)   sum_q <= added;
    else if (op == PU_SHIFT) sum_q <= shifted;
  end

  assign shift_out = sum_q;
  assign down      = outmsk ? sum_q : '0;
endmodule
