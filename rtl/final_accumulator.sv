// final_accumulator: W-bit accumulator behind a block's OR selector.
//
// On a clock edge with en high (the FINRES strobe) it adds its input to
// its content when keep is high, or to zero when keep is low (the RESET
// control of the document: RESET = 0 starts a new vector element). Issuing
// keep = 0 every k-th strobe groups k successive unit sums into one vector
// element, the "periodic addition" of the add-and-shift method. Sums wrap
// modulo 2**W. The synchronous active-low reset is this design's choice.
module final_accumulator #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,     // FINRES
  input  logic         keep,   // RESET: 1 = accumulate, 0 = restart
  input  logic [W-1:0] din,
  output logic [W-1:0] acc
);
  always_ff @(posedge clk) begin
    if (!rst_n)   acc <= '0;
    else if (en)  acc <= (keep ? acc : '0) + din;
  end
endmodule
