// row_decoder: row-address to word-line decoder of the edge-flag memory.
//
// Structured like the prototype chip's 8-to-256 decoder: four sub-decoders
// (6-to-64 at the default size), each with its own enable, so only the
// quarter of the memory that holds the addressed row switches. The two
// upper address bits form the four enables. Inside a sub-decoder two
// predecoders (3-to-8 each at the default size) decode the low and the
// middle address bits, and each word line is the 2-input AND of one output
// of each. The chip builds the last stage from NAND gates; this is the same
// function in positive logic.
//
// Interface: en gates every word line (no row selected when low); wl is
// one-hot with wl[addr] = 1 when en is high. Purely combinational.
module row_decoder #(
  parameter int unsigned AW = 8   // address bits: 2**AW word lines (>= 4)
) (
  input  logic              en,
  input  logic [AW-1:0]     addr,
  output logic [2**AW-1:0]  wl
);
  localparam int unsigned LOB  = (AW - 2) / 2;      // low predecoder bits
  localparam int unsigned MIDB = AW - 2 - LOB;      // middle predecoder bits
  localparam int unsigned NLO  = 2**LOB;
  localparam int unsigned NMID = 2**MIDB;

  logic [3:0]      sub_en;    // enables of the four sub-decoders
  logic [NLO-1:0]  pre_lo;    // low predecoder, one-hot
  logic [NMID-1:0] pre_mid;   // middle predecoder, one-hot

  always_comb begin
    sub_en  = 4'(en) << addr[AW-1 -: 2];
    pre_lo  = NLO'(1)  << addr[LOB-1:0];
    pre_mid = NMID'(1) << addr[AW-3 -: MIDB];
  end

  always_comb begin
    for (int s = 0; s < 4; s++)
      for (int m = 0; m < NMID; m++)
        for (int l = 0; l < NLO; l++)
          wl[(s*NMID + m)*NLO + l] = sub_en[s] & pre_mid[m] & pre_lo[l];
  end
endmodule
