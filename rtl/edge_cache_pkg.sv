// edge_cache_pkg: sizes and command types shared by the edge-flag cache
// memory vector generator.
//
// The default sizes are those of the prototype chip: a 256 x 256 edge-flag
// memory split into 8 blocks of 32 columns, one processing unit (PU) per
// 4 adjacent columns (64 PUs, 8 per block) and 8-bit sums.
//
// The chip itself is steered by raw control signals (S, INMSK, OUTMSK,
// RESET, FINRES). This design packs them into one command per operation
// (cmd_t); the encoding is this design's own choice.
package edge_cache_pkg;

  localparam int unsigned ROWS_DEF      = 256; // memory rows
  localparam int unsigned COLS_DEF      = 256; // memory columns
  localparam int unsigned NBLK_DEF      = 8;   // memory / processing blocks
  localparam int unsigned UNIT_DEF      = 4;   // columns per PU (1x4 unit)
  localparam int unsigned W_DEF         = 8;   // PU / accumulator width

  // Operation of one command.
  //   OP_HOLD     short cycle: PUs keep their sums (used for capture only
  //               or to shift the control masks)
  //   OP_SHIFT    short cycle: every PU takes the sum of its left neighbour
  //   OP_ADD      long cycle : read one row, every PU adds its 4 bits
  //   OP_SHIFTADD long cycle : read one row while the PUs shift, then add
  typedef enum logic [1:0] {
    OP_HOLD     = 2'd0,
    OP_SHIFT    = 2'd1,
    OP_ADD      = 2'd2,
    OP_SHIFTADD = 2'd3
  } op_e;

  // PU register operation in one base cycle.
  typedef enum logic [1:0] {
    PU_HOLD  = 2'd0,
    PU_SHIFT = 2'd1,
    PU_ADD   = 2'd2
  } pu_op_e;

  typedef struct packed {
    op_e        op;      // operation
    logic [7:0] row;     // memory row for OP_ADD / OP_SHIFTADD
    logic       cap;     // FINRES: accumulator samples the selected PU
    logic       keep;    // RESET : 1 = add to accumulator, 0 = add to zero
    logic       mshift;  // shift both control-mask chains by one place
    logic       imsk_in; // bit entering the INMSK chain on mshift
    logic       omsk_in; // bit entering the OUTMSK chain on mshift
  } cmd_t;

endpackage
