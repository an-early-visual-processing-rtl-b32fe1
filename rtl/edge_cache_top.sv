// edge_cache_top: feature-vector generator built around a directional
// edge-flag cache memory (the prototype chip configuration).
//
// The edge flags of one direction of a whole scene (256 x 256 pixels by
// default) are written once into the cache memory and can then be
// projected from any rectangular region, in any of the usual ways (column
// sums, diagonal sums, cell sums, ...), without extracting the edges again.
// Projection uses the add-and-shift method: a row is read, every processing
// unit (PU) adds the 4 flags of its column group to its sum ("add"), and
// the sums can be moved one PU to the right ("shift"). Adds alone give
// column-group sums; alternating add and shift gives diagonal sums. Control
// masks cut the PU chain to the region: the first PU of the region takes 0
// instead of its neighbour's sum (INMSK = 0), and only the last one drives
// the OR selectors (OUTMSK = 1). The per-block accumulators add successive
// outputs of that PU in groups to form vector elements, and a final OR
// selector picks the one block whose accumulator is non-zero.
//
// Structure (defaults): row_decoder (8 -> 256 word lines) shared by 8
// sram_blocks of 256 x 32; under each, a processing_block of 8 PUs with
// mask chains, an 8-input OR selector and an accumulator; a final 8-input
// OR selector; and phase_ctrl, which turns commands into the long/short
// two-phase timing. Memory split, PU grouping, widths and selectors follow
// the document; the write port, the command interface, the serial mask
// loading and the output valid strobe are this design's choices.
//
// Interface
//   wr_en/wr_row/wr_data  write one full memory row (bit c = column c,
//                         column 0 leftmost). Accepted when wr_ready
//                         (no memory read in this cycle).
//   cmd_valid/cmd_ready/cmd  command stream (edge_cache_pkg::cmd_t), see
//                         phase_ctrl for timing.
//   vec_out, vec_valid    vec_valid is high in the cycle after a capture
//                         (cmd.cap); vec_out then shows the accumulator of
//                         the block holding the final PU.
//   sel_out               current output of the final PU (OR of all masked
//                         PU sums), for observation.
module edge_cache_top
  import edge_cache_pkg::*;
#(
  parameter int unsigned ROWS = ROWS_DEF,   // memory rows
  parameter int unsigned COLS = COLS_DEF,   // memory columns
  parameter int unsigned NBLK = NBLK_DEF,   // memory / processing blocks
  parameter int unsigned UNIT = UNIT_DEF,   // columns per PU
  parameter int unsigned W    = W_DEF       // sum width
) (
  input  logic            clk,
  input  logic            rst_n,
  // memory write port
  input  logic            wr_en,
  input  logic [7:0]      wr_row,
  input  logic [COLS-1:0] wr_data,
  output logic            wr_ready,
  // commands
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  cmd_t            cmd,
  output logic            busy,
  // results
  output logic [W-1:0]    vec_out,
  output logic            vec_valid,
  output logic [W-1:0]    sel_out
);
  localparam int unsigned AW   = $clog2(ROWS);
  localparam int unsigned BCOL = COLS / NBLK;     // columns per block
  localparam int unsigned NPU  = BCOL / UNIT;     // PUs per block

  // ---- controller -------------------------------------------------------
  logic          rd_en, acc_en, acc_keep, mask_shift, imsk_in, omsk_in;
  logic [AW-1:0] rd_row;
  pu_op_e        pu_op;

  phase_ctrl #(.AW(AW)) u_ctrl (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .busy,
    .rd_en, .rd_row, .pu_op, .acc_en, .acc_keep,
    .mask_shift, .imsk_in, .omsk_in);

  // ---- memory ------------------------------------------------------------
  logic            wr_go;
  logic [ROWS-1:0] wl;
  logic [AW-1:0]   addr;

  assign wr_ready = !rd_en;
  assign wr_go    = wr_en && !rd_en;
  assign addr     = rd_en ? rd_row : wr_row[AW-1:0];

  row_decoder #(.AW(AW)) u_dec (.en(rd_en || wr_go), .addr, .wl);

  // ---- blocks ------------------------------------------------------------
  logic [W-1:0] chain [NBLK+1];
  logic         imsk_c [NBLK+1];
  logic         omsk_c [NBLK+1];
  logic [W-1:0] blk_sel [NBLK];
  logic [W-1:0] blk_acc [NBLK];

  assign chain[0]  = '0;
  assign imsk_c[0] = imsk_in;
  assign omsk_c[0] = omsk_in;

  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    logic [BCOL-1:0] flags;

    sram_block #(.ROWS(ROWS), .CW(BCOL)) u_mem (
      .clk, .wl, .we(wr_go), .wdata(wr_data[b*BCOL +: BCOL]),
      .re(rd_en), .rdata(flags));

    processing_block #(.NPU(NPU), .UNIT(UNIT), .W(W)) u_pb (
      .clk, .rst_n, .pu_op, .flags,
      .shift_in (chain[b]),   .shift_out(chain[b+1]),
      .mask_shift,
      .imsk_sin (imsk_c[b]),  .omsk_sin (omsk_c[b]),
      .imsk_sout(imsk_c[b+1]), .omsk_sout(omsk_c[b+1]),
      .acc_en, .acc_keep,
      .sel(blk_sel[b]), .acc(blk_acc[b]));
  end

  or_selector #(.N(NBLK), .W(W)) u_final_sel (.din(blk_acc), .dout(vec_out));
  or_selector #(.N(NBLK), .W(W)) u_final_pu  (.din(blk_sel), .dout(sel_out));

  always_ff @(posedge clk) begin
    if (!rst_n) vec_valid <= 1'b0;
    else        vec_valid <= acc_en;
  end

  // the host must not write while the memory is being read
  a_wr_ready: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> wr_ready);

  if (COLS % (NBLK * UNIT) != 0 || ROWS > 256) begin : g_size_check
    $error("COLS must be a multiple of NBLK*UNIT and ROWS at most 256");
  end
endmodule
