// tb_processing_block: one processing block (8 PUs, masks, OR selector,
// accumulator) under random PU operations, flags, shift inputs, mask
// shifts and accumulator strobes, compared cycle by cycle with a reference
// model of the whole block. A second phase loads a region (PUs 2..5),
// does a diagonal add/shift pass and checks the accumulated diagonal sums.
module tb_processing_block;
  timeunit 1ns; timeprecision 1ps;
  import edge_cache_pkg::*;
  localparam int N = 8;
  logic          clk = 0, rst_n = 0;
  pu_op_e        pu_op = PU_HOLD;
  logic [31:0]   flags = 0;
  logic [7:0]    shift_in = 0, shift_out, sel, acc;
  logic          mask_shift = 0, imsk_sin = 0, omsk_sin = 0, imsk_sout, omsk_sout;
  logic          acc_en = 0, acc_keep = 0;
  int checks = 0, failures = 0;

  logic [7:0] m_sum [N];
  logic [N-1:0] m_in = 0, m_out = 0;
  logic [7:0] m_acc = 0;

  always #5 clk = ~clk;
  processing_block dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] m_sel();
    logic [7:0] s = 0;
    for (int j = 0; j < N; j++) if (m_out[j]) s |= m_sum[j];
    return s;
  endfunction

  // advance the model by one clock edge with the current inputs
  task automatic model_step();
    logic [7:0] ns [N];
    logic [7:0] sv = m_sel();
    for (int j = 0; j < N; j++) begin
      logic [7:0] left = (j == 0) ? shift_in : m_sum[j-1];
      case (pu_op)
        PU_ADD:   ns[j] = m_sum[j] + 8'($countones(flags[j*4 +: 4]));
        PU_SHIFT: ns[j] = m_in[j] ? left : 8'd0;
        default:  ns[j] = m_sum[j];
      endcase
    end
    if (acc_en) m_acc = (acc_keep ? m_acc : 8'd0) + sv;
    if (mask_shift) begin
      m_in  = {m_in[N-2:0], imsk_sin};
      m_out = {m_out[N-2:0], omsk_sin};
    end
    m_sum = ns;
  endtask

  task automatic compare(string what);
    checks++;
    if (sel !== m_sel() || acc !== m_acc || shift_out !== m_sum[N-1] ||
        imsk_sout !== m_in[N-1] || omsk_sout !== m_out[N-1]) begin
      failures++;
      $display("FAIL %s: sel %0d/%0d acc %0d/%0d sout %0d/%0d", what,
               sel, m_sel(), acc, m_acc, shift_out, m_sum[N-1]);
    end
  endtask

  initial begin
    foreach (m_sum[j]) m_sum[j] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      pu_op      = pu_op_e'($urandom % 3);
      flags      = $urandom;
      shift_in   = 8'($urandom);
      mask_shift = ($urandom % 4) == 0;
      imsk_sin   = 1'($urandom);
      omsk_sin   = ($urandom % 4) == 0;
      acc_en     = 1'($urandom);
      acc_keep   = 1'($urandom);
      model_step();
      @(posedge clk); #1;
      compare("random");
    end

    // diagonal pass over PUs 2..5, 4 row groups, sums of 7 diagonals
    begin
      automatic int u [4][4];
      automatic int d [7];
      @(negedge clk);
      acc_en = 0; shift_in = 0;
      // load masks: INMSK 1 on 3..5, OUTMSK 1 on 5
      for (int t = 0; t < N; t++) begin
        automatic int g = N - 1 - t;
        pu_op = PU_HOLD; mask_shift = 1;
        imsk_sin = (g > 2 && g <= 5); omsk_sin = (g == 5);
        model_step();
        @(negedge clk);
      end
      mask_shift = 0;
      for (int t = 0; t < 4; t++) begin   // clear the region
        pu_op = PU_SHIFT; model_step(); @(negedge clk);
      end
      for (int k = 0; k < 4; k++) begin
        for (int j = 0; j < 4; j++) u[k][j] = $urandom % 5;
        flags = 0;
        for (int j = 0; j < 4; j++)
          flags[(2+j)*4 +: 4] = 4'((1 << u[k][j]) - 1);
        pu_op = PU_ADD; acc_en = 0;
        model_step(); @(negedge clk);
        pu_op = PU_SHIFT; acc_en = 1; acc_keep = 0;
        model_step(); @(negedge clk);
      end
      for (int t = 0; t < 3; t++) begin
        pu_op = PU_SHIFT; acc_en = 1; acc_keep = 0;
        model_step(); @(negedge clk);
      end
      acc_en = 0; pu_op = PU_HOLD;
      compare("diagonal");
      // independent check of the last diagonal: only u[3][0]
      checks++;
      if (acc !== 8'(u[3][0])) begin
        failures++;
        $display("FAIL last diagonal %0d expected %0d", acc, u[3][0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
