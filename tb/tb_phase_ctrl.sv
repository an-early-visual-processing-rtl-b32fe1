// tb_phase_ctrl: streams random commands, with random gaps, into the
// two-phase controller and checks every cycle's outputs against the
// expected expansion: a memory command (add, shift-add) takes two cycles,
// a read (plus a shift for shift-add) then an add; shift and hold take one
// cycle; capture and mask shift act in the first cycle. Also checks that
// cmd_ready drops only in the first cycle of a memory command and that a
// back-to-back stream of L long and S short commands takes 2L+S cycles.
module tb_phase_ctrl;
  timeunit 1ns; timeprecision 1ps;
  import edge_cache_pkg::*;
  logic       clk = 0, rst_n = 0, cmd_valid = 0, cmd_ready, busy;
  cmd_t       cmd = '0;
  logic       rd_en, acc_en, acc_keep, mask_shift, imsk_in, omsk_in;
  logic [7:0] rd_row;
  pu_op_e     pu_op;
  int checks = 0, failures = 0;

  typedef struct packed {
    logic       rd_en;
    logic [7:0] rd_row;
    pu_op_e     pu_op;
    logic       acc_en;
    logic       acc_keep;
    logic       mask_shift;
    logic [1:0] msk;
  } exp_t;
  exp_t expq [$];

  always #5 clk = ~clk;
  phase_ctrl dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expand(cmd_t c);
    exp_t a = '0, b = '0;
    a.acc_en = c.cap; a.acc_keep = c.cap & c.keep;
    a.mask_shift = c.mshift; a.msk = c.mshift ? {c.imsk_in, c.omsk_in} : 2'b00;
    case (c.op)
      OP_HOLD:  a.pu_op = PU_HOLD;
      OP_SHIFT: a.pu_op = PU_SHIFT;
      OP_ADD, OP_SHIFTADD: begin
        a.pu_op = (c.op == OP_ADD) ? PU_HOLD : PU_SHIFT;
        a.rd_en = 1; a.rd_row = c.row;
        b.pu_op = PU_ADD;
      end
      default: ;
    endcase
    expq.push_back(a);
    if (c.op inside {OP_ADD, OP_SHIFTADD}) expq.push_back(b);
  endfunction

  // per-cycle comparison, sampled just before the rising edge
  always @(negedge clk) if (rst_n) begin
    exp_t g, e;
    g = '0;
    g.rd_en = rd_en; g.rd_row = rd_en ? rd_row : 8'd0; g.pu_op = pu_op;
    g.acc_en = acc_en; g.acc_keep = acc_en & acc_keep;
    g.mask_shift = mask_shift; g.msk = mask_shift ? {imsk_in, omsk_in} : 2'b00;
    if (busy) begin
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("FAIL busy with nothing expected");
      end else begin
        e = expq.pop_front();
        if (g !== e) begin
          failures++;
          $display("FAIL cycle: got %p expected %p", g, e);
        end
      end
    end else if (g.rd_en || g.pu_op != PU_HOLD || g.acc_en || g.mask_shift) begin
      checks++; failures++;
      $display("FAIL strobes while idle");
    end
  end

  int cyc = 0;
  always @(posedge clk) if (busy) cyc++;

  task automatic send(cmd_t c);
    // drive shortly after the edge so the previous acceptance is settled
    cmd = c; cmd_valid = 1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    expand(c);
    #1 cmd_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      automatic cmd_t c = cmd_t'({$urandom, $urandom});
      if ($urandom % 3 == 0) repeat ($urandom % 3) @(posedge clk);
      #1 send(c);
    end
    repeat (4) @(posedge clk);
    // back-to-back throughput: 10 long and 7 short commands
    cyc = 0;
    for (int i = 0; i < 17; i++) begin
      automatic cmd_t c = '0;
      c.op = (i < 10) ? OP_SHIFTADD : OP_SHIFT;
      c.row = 8'(i);
      if (i == 0) #1;
      send(c);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (cyc != 2*10 + 7) begin
      failures++;
      $display("FAIL stream took %0d cycles, expected 27", cyc);
    end
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d expected cycles left", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
