// sram_block: one block of the edge-flag cache memory (256 rows x 32
// columns at the default size; the prototype chip has eight of them side by
// side, sharing the word lines).
//
// The memory is single-ported, as in the prototype chip: in one cycle a row
// is either written or read. The row is chosen by a one-hot word-line
// vector from row_decoder. A read loads the selected row into the output
// register rdata, which stands for the clocked latch-type sense amplifiers;
// rdata keeps its value until the next read. Writes take a whole row of the
// block at once (the document gives no write width; this is this design's
// choice). Edge flags are stored exactly as they sit in the scene or, for
// diagonal work, with each 2x2 pixel unit folded into 4 adjacent columns;
// the block does not care which.
//
// Timing: word lines, we/re and wdata are sampled at the rising clock edge;
// rdata is valid from that edge on. If both we and re are high the write
// happens and rdata is left unchanged.
module sram_block #(
  parameter int unsigned ROWS = 256,
  parameter int unsigned CW   = 32     // columns in this block
) (
  input  logic            clk,
  input  logic [ROWS-1:0] wl,          // one-hot word lines
  input  logic            we,
  input  logic [CW-1:0]   wdata,
  input  logic            re,
  output logic [CW-1:0]   rdata
);
  logic [CW-1:0] mem [ROWS];
  logic [CW-1:0] bitline;              // wired-OR of the selected row

  always_comb begin
    bitline = '0;
    for (int r = 0; r < ROWS; r++)
      if (wl[r]) bitline |= mem[r];
  end

  always_ff @(posedge clk) begin
    if (we) begin
      for (int r = 0; r < ROWS; r++)
        if (wl[r]) mem[r] <= wdata;
    end else if (re) begin
      rdata <= bitline;
    end
  end
endmodule
