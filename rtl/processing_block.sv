// processing_block: the processing structure under one memory block.
//
// At the default size it serves 32 memory columns with 8 processing units
// (one per 4 adjacent columns), 8 input-mask and 8 output-mask bits, an
// 8-bit 8-input OR selector and an 8-bit final accumulator, as in the
// prototype chip. The PUs form one shift chain from left (PU 0) to right;
// shift_in comes from the last PU of the block on the left (tie to 0 for
// the leftmost block) and shift_out goes to the next block. The two mask
// chains are cascaded the same way through *_sin / *_sout.
//
// All PUs work on every cycle under the same pu_op; the region of interest
// is set only by the masks: the first PU of the region has INMSK = 0, the
// last has OUTMSK = 1 and is the only one that drives the OR selector. The
// accumulator samples the selector output on acc_en (FINRES) and adds it to
// itself (acc_keep = 1) or to zero (acc_keep = 0). Blocks that do not hold
// the final PU accumulate zeros, so acc is zero there once acc_keep = 0 has
// been issued.
//
// Timing: PU sums, masks and acc update at the rising clock edge; sel
// (the OR of the masked PU sums) is combinational from the PU registers
// and masks.
module processing_block
  import edge_cache_pkg::*;
#(
  parameter int unsigned NPU  = 8,     // PUs in this block
  parameter int unsigned UNIT = 4,     // columns per PU
  parameter int unsigned W    = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  pu_op_e              pu_op,
  input  logic [NPU*UNIT-1:0] flags,       // bit c = column c of the block
  input  logic [W-1:0]        shift_in,
  output logic [W-1:0]        shift_out,
  input  logic                mask_shift,
  input  logic                imsk_sin,
  input  logic                omsk_sin,
  output logic                imsk_sout,
  output logic                omsk_sout,
  input  logic                acc_en,
  input  logic                acc_keep,
  output logic [W-1:0]        sel,
  output logic [W-1:0]        acc
);
  logic [NPU-1:0] inmsk, outmsk;
  logic [W-1:0]   chain [NPU+1];
  logic [W-1:0]   down  [NPU];

  mask_register #(.N(NPU)) u_inmsk (
    .clk, .rst_n, .shift(mask_shift), .sin(imsk_sin), .q(inmsk), .sout(imsk_sout));
  mask_register #(.N(NPU)) u_outmsk (
    .clk, .rst_n, .shift(mask_shift), .sin(omsk_sin), .q(outmsk), .sout(omsk_sout));

  assign chain[0] = shift_in;

  for (genvar j = 0; j < NPU; j++) begin : g_pu
    processing_unit #(.W(W), .UNIT(UNIT)) u_pu (
      .clk, .rst_n,
      .op       (pu_op),
      .flags    (flags[j*UNIT +: UNIT]),
      .shift_in (chain[j]),
      .inmsk    (inmsk[j]),
      .outmsk   (outmsk[j]),
      .shift_out(chain[j+1]),
      .down     (down[j]));
  end

  assign shift_out = chain[NPU];

  or_selector #(.N(NPU), .W(W)) u_sel (.din(down), .dout(sel));

  final_accumulator #(.W(W)) u_acc (
    .clk, .rst_n, .en(acc_en), .keep(acc_keep), .din(sel), .acc);
endmodule
