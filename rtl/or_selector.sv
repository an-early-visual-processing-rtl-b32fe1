// or_selector: N-input, W-bit selector made of OR gates.
//
// Of the N inputs all but one are zero by construction (their PU's output
// mask, or their accumulator, is zero), so the bitwise OR of all of them is
// the one non-zero source. The prototype chip uses this for the 8-bit
// 8-input selector of each processing block and for the final selector
// over the 8 blocks. Combinational.
module or_selector #(
  parameter int unsigned N = 8,
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] din [N],
  output logic [W-1:0] dout
);
  always_comb begin
    dout = '0;
    for (int i = 0; i < N; i++) dout |= din[i];
  end
endmodule
