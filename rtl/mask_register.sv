// mask_register: serial chain of control-mask bits, one bit per PU.
//
// Each processing block holds one chain for the input control masks
// (INMSK) and one for the output control masks (OUTMSK); the chains of
// neighbouring blocks are joined through sin/sout into one chain over all
// PUs. On a clock edge with shift high every bit moves one PU to the right:
// q[0] takes sin and sout is the bit leaving q[N-1]. Moving the single 1 of
// the output mask one place per cycle is how the document reads out the
// next vector element without shifting the PU sums.
//
// The document says the mask bits are "sent" to the PUs; loading them
// through a serial chain, and clearing them on reset, is this design's
// choice.
module mask_register #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         sin,
  output logic [N-1:0] q,
  output logic         sout
);
  always_ff @(posedge clk) begin
    if (!rst_n)      q <= '0;
    else if (shift)  q <= {q[N-2:0], sin};
  end

  assign sout = q[N-1];
endmodule
