// phase_ctrl: two-phase timing controller of the add/shift engine.
//
// The document clocks the engine with two cycle lengths: an operation that
// reads the memory needs a long cycle, a pure shift needs only a short one
// (half as long), and an add followed by a shift fits in one long cycle.
// Here the base clock is the short cycle and a long cycle is two base
// cycles:
//   OP_ADD      phase A: read the row;            phase B: PUs add
//   OP_SHIFTADD phase A: read the row, PUs shift; phase B: PUs add
//   OP_SHIFT    one cycle: PUs shift
//   OP_HOLD     one cycle: PUs keep their sums
// The accumulator strobe (cap -> acc_en, keep -> acc_keep) and the mask
// shift (mshift) act in the first (or only) cycle of a command, i.e. on the
// PU sums as they were before that command. A diagonal projection of K row
// groups over L PUs is OP_ADD, K-1 x OP_SHIFTADD, L x OP_SHIFT with cap on
// every shift; a vertical one is K x OP_ADD then L captures. Splitting a
// long cycle into a read phase and an add phase, and the command format,
// are this design's choices.
//
// Interface: valid/ready command input. A command is accepted on a rising
// edge with cmd_valid && cmd_ready and executed in the following cycle(s);
// the outputs below are combinational from the command being executed.
// cmd_ready is low only in phase A of a long command, so commands can
// stream back to back: a long command occupies 2 cycles, a short one 1.
// busy is high while a command executes.
module phase_ctrl
  import edge_cache_pkg::*;
#(
  parameter int unsigned AW = 8        // row address bits
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          cmd_valid,
  output logic          cmd_ready,
  input  cmd_t          cmd,
  output logic          busy,
  output logic          rd_en,      // memory read, row rd_row
  output logic [AW-1:0] rd_row,
  output pu_op_e        pu_op,      // S control of every PU
  output logic          acc_en,     // FINRES
  output logic          acc_keep,   // RESET
  output logic          mask_shift,
  output logic          imsk_in,
  output logic          omsk_in
);
  cmd_t cur_q;
  logic cur_v_q;       // a command is executing
  logic phb_q;         // in phase B of a long command
  logic is_long;

  always_comb is_long = (cur_q.op == OP_ADD) || (cur_q.op == OP_SHIFTADD);

  // the executing command finishes in this cycle unless it is a long one
  // in phase A
  assign cmd_ready = !cur_v_q || !is_long || phb_q;
  assign busy      = cur_v_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_v_q <= 1'b0;
      phb_q   <= 1'b0;
      cur_q   <= '0;
    end else if (cur_v_q && is_long && !phb_q) begin
      phb_q <= 1'b1;
    end else begin
      phb_q   <= 1'b0;
      cur_v_q <= cmd_valid;
      if (cmd_valid) cur_q <= cmd;
    end
  end

  always_comb begin
    rd_en      = 1'b0;
    rd_row     = cur_q.row[AW-1:0];
    pu_op      = PU_HOLD;
    acc_en     = 1'b0;
    acc_keep   = cur_q.keep;
    mask_shift = 1'b0;
    imsk_in    = cur_q.imsk_in;
    omsk_in    = cur_q.omsk_in;
    if (cur_v_q) begin
      if (!phb_q) begin
        acc_en     = cur_q.cap;
        mask_shift = cur_q.mshift;
        unique case (cur_q.op)
          OP_HOLD:     pu_op = PU_HOLD;
          OP_SHIFT:    pu_op = PU_SHIFT;
          OP_ADD:      begin pu_op = PU_HOLD;  rd_en = 1'b1; end
          OP_SHIFTADD: begin pu_op = PU_SHIFT; rd_en = 1'b1; end
          default:     pu_op = PU_HOLD;
        endcase
      end else begin
        pu_op = PU_ADD;
      end
    end
  end

  // rows above the address range are not allowed
  if (AW < 8) begin : g_rowchk
    a_row_range: assert property (@(posedge clk) disable iff (!rst_n)
      cmd_valid && cmd_ready && (cmd.op inside {OP_ADD, OP_SHIFTADD})
        |-> (cmd.row >> AW) == 0);
  end
endmodule
