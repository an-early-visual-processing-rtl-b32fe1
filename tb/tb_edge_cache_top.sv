// tb_edge_cache_top: end-to-end test of the edge-flag cache memory vector
// generator at its default (full) size, 256 x 256 flags and 64 PUs.
//
// A pseudo-random edge-flag scene is written into the memory row by row.
// Then the projections of the add-and-shift method are run on it and every
// vector element is compared with a value computed directly from the scene
// in the testbench:
//   * PPED vertical, flags stored as in the scene: 64 adds over a 64-row
//     band, after which each PU holds one 4-column element; the elements
//     of all 64 PUs are read by moving the output-mask bit (one per cycle).
//   * PPED vertical, 2x2 units folded into 4 columns: 32 adds, 32 shifts,
//     elements grouped in pairs by the accumulator.
//   * PPED diagonal (2x2 units): 1 add, 31 shift-adds, 32 shifts; 63
//     diagonal sums grouped by 4 in the accumulator.
//   * CED: 4 bands of 16 rows, 16 adds + 16 shifts each, cells of 4 PUs;
//     and with 2x2 units: 4 bands of 8 row groups, 32 shifts each, cells
//     of 8 unit columns.
//   * EM: two 8-row-group bands (16 pixel rows each), 32 elements each.
//   * Ego-motion: 32 row groups, 32 shifts, one element per unit column.
// The base-cycle count of each projection is checked against
// 2 x (memory commands) + (short commands). Each mechanism (add,
// shift-add, shift, accumulator grouping, output-mask stepping, region
// start cut by the input mask, write refused during a read) is counted
// and must occur.
module tb_edge_cache_top;
  timeunit 1ns; timeprecision 1ps;
  import edge_cache_pkg::*;

  localparam int ROWS = 256, COLS = 256, NPU = 64, W = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic            wr_en = 0;
  logic [7:0]      wr_row = 0;
  logic [COLS-1:0] wr_data = '0;
  logic            wr_ready, cmd_valid = 0, cmd_ready, busy, vec_valid;
  cmd_t            cmd = '0;
  logic [W-1:0]    vec_out, sel_out;

  edge_cache_top dut (.*);

  int checks = 0, failures = 0;
  int n_add = 0, n_shiftadd = 0, n_shift = 0, n_group = 0, n_mstep = 0;
  int n_cut = 0, n_wr_block = 0;

  logic [COLS-1:0] scene [ROWS];
  logic [W-1:0]    got [$];

  // ---- watchdog -----------------------------------------------------------
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- output capture -----------------------------------------------------
  always @(posedge clk) if (vec_valid) got.push_back(vec_out);

  // region start: the first PU of the region is told to shift while its
  // left neighbour holds a non-zero sum that must not enter
  logic [7:0]   cut_pu = 0;
  logic [W-1:0] pu_sum [NPU];
  for (genvar b = 0; b < NPU/8; b++) begin : g_b
    for (genvar j = 0; j < 8; j++) begin : g_j
      assign pu_sum[b*8 + j] = dut.g_blk[b].u_pb.g_pu[j].u_pu.sum_q;
    end
  end
  always @(posedge clk)
    if (dut.pu_op == PU_SHIFT && cut_pu != 0 && pu_sum[cut_pu-1] != 0)
      n_cut++;

  // ---- helpers ------------------------------------------------------------
  function automatic int unit_cnt(int r, int pu);
    int c = 0;
    for (int i = 0; i < 4; i++) c += int'(scene[r][pu*4 + i]);
    return c;
  endfunction

  task automatic send(op_e op, int row = 0, bit cap = 0, bit keep = 0,
                      bit mshift = 0, bit imsk = 0, bit omsk = 0);
    @(negedge clk);
    cmd.op = op; cmd.row = 8'(row); cmd.cap = cap; cmd.keep = keep;
    cmd.mshift = mshift; cmd.imsk_in = imsk; cmd.omsk_in = omsk;
    cmd_valid = 1;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
    case (op)
      OP_ADD:      n_add++;
      OP_SHIFTADD: n_shiftadd++;
      OP_SHIFT:    n_shift++;
      default: ;
    endcase
    if (cap && keep) n_group++;
  endtask

  task automatic drain();
    @(negedge clk);
    cmd_valid = 0;
    while (busy) @(negedge clk);
    @(negedge clk);
  endtask

  // run the command sequence and count base cycles with a command active
  int cyc = 0;
  bit counting = 0;
  always @(posedge clk) if (counting && busy) cyc++;

  // region from PU s to PU e: INMSK 0 at s, 1 at s+1..e; OUTMSK 1 at e
  task automatic load_masks(int s, int e);
    for (int t = 0; t < NPU; t++) begin
      int g = NPU - 1 - t;
      send(OP_HOLD, 0, 0, 0, 1, (g > s && g <= e), (g == e));
    end
    drain();
    cut_pu = 8'(s);
  endtask

  // clear the sums of PUs s..e by shifting zeros in
  task automatic clear_region(int len);
    for (int i = 0; i < len; i++) send(OP_SHIFT);
    drain();
  endtask

  task automatic check(string what, int idx, int exp_v);
    checks++;
    if (got.size() == 0) begin
      failures++;
      $display("FAIL %s[%0d]: no output", what, idx);
    end else begin
      logic [W-1:0] v = got.pop_front();
      if (v != W'(exp_v)) begin
        failures++;
        $display("FAIL %s[%0d]: got %0d expected %0d", what, idx, v, W'(exp_v));
      end
    end
  endtask

  task automatic check_cycles(string what, int nlong, int nshort);
    checks++;
    if (cyc != 2*nlong + nshort) begin
      failures++;
      $display("FAIL %s: %0d base cycles, expected %0d", what, cyc, 2*nlong + nshort);
    end else
      $display("%s: %0d base cycles = %0d.%0d clk (%0d long + %0d short)",
               what, cyc, cyc/2, (cyc%2)*5, nlong, nshort);
  endtask

  task automatic start_count(); cyc = 0; counting = 1; endtask
  task automatic stop_count();  drain(); counting = 0; endtask

  // vertical projection read out by shifting: K rows from r0 over PUs
  // s..s+L-1, accumulator period P; elements come out right to left
  task automatic vertical_shift(string what, int r0, int K, int s, int L, int P);
    int e = s + L - 1;
    load_masks(s, e);
    clear_region(L);
    got.delete();
    start_count();
    for (int k = 0; k < K; k++) send(OP_ADD, r0 + k);
    for (int m = 0; m < L; m++) send(OP_SHIFT, 0, 1, (m % P) != 0);
    stop_count();
    check_cycles(what, K, L);
    for (int m = 0; m < L; m++) begin
      int colsum = 0;
      for (int k = 0; k < K; k++) colsum += unit_cnt(r0 + k, e - m);
      if ((m % P) == P - 1 || m == L - 1) begin
        int ex = 0;
        for (int q = m - (m % P); q <= m; q++)
          for (int k = 0; k < K; k++) ex += unit_cnt(r0 + k, e - q);
        repeat (m % P) void'(got.pop_front());
        check(what, m / P, ex);
      end
    end
  endtask

  // diagonal projection: K row groups from r0 over PUs s..s+L-1
  task automatic diagonal(string what, int r0, int K, int s, int L, int P);
    int e = s + L - 1;
    int nout = K + L - 1;
    int d [];
    load_masks(s, e);
    clear_region(L);
    got.delete();
    start_count();
    send(OP_ADD, r0);
    for (int k = 1; k < K; k++) send(OP_SHIFTADD, r0 + k, 1, ((k-1) % P) != 0);
    for (int m = K - 1; m < nout; m++) send(OP_SHIFT, 0, 1, (m % P) != 0);
    stop_count();
    check_cycles(what, K, L);
    // output m is the sum along the diagonal j - k = L-1-m
    d = new[nout];
    for (int m = 0; m < nout; m++) begin
      d[m] = 0;
      for (int k = 0; k < K; k++) begin
        int j = L - 1 - m + k;
        if (j >= 0 && j < L) d[m] += unit_cnt(r0 + k, s + j);
      end
    end
    for (int m = 0; m < nout; m++)
      if ((m % P) == P - 1 || m == nout - 1) begin
        int ex = 0;
        for (int q = m - (m % P); q <= m; q++) ex += d[q];
        repeat (m % P) void'(got.pop_front());
        check(what, m / P, ex);
      end
  endtask

  initial begin : main
    automatic int r0, s, t;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        scene[r][c] = ($urandom % 100) < 30;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- fill the cache memory -----------------------------------------
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      wr_en = 1; wr_row = 8'(r); wr_data = scene[r];
      @(posedge clk);
    end
    @(negedge clk);
    wr_en = 0;

    // ---- PPED vertical, flags as in the scene, fast read-out -----------
    // 64 adds give every PU its 4-column sum over rows r0..r0+63; the
    // output-mask bit is then stepped across all 64 PUs, one element per
    // cycle: 16-element vectors of every 4-aligned 64x64 window of the band.
    r0 = 37;
    load_masks(0, 0);          // OUTMSK on PU 0
    clear_region(NPU);
    got.delete();
    start_count();
    for (int k = 0; k < 64; k++) send(OP_ADD, r0 + k);
    for (int j = 0; j < NPU; j++) begin
      send(OP_HOLD, 0, 1, 0, 1, 0, 0);
      n_mstep++;
    end
    stop_count();
    check_cycles("pped_vertical_fast", 64, NPU);
    for (int j = 0; j < NPU; j++) begin
      automatic int ex = 0;
      for (int k = 0; k < 64; k++) ex += unit_cnt(r0 + k, j);
      check("pped_vertical_fast", j, ex);
    end

    // ---- write refused while the memory is read -------------------------
    load_masks(0, 0);
    @(negedge clk);
    cmd.op = OP_ADD; cmd.row = 8'd3; cmd.cap = 0; cmd.mshift = 0; cmd_valid = 1;
    @(posedge clk);
    @(negedge clk);
    cmd_valid = 0;
    checks++;
    if (dut.rd_en && !wr_ready) n_wr_block++;
    else begin failures++; $display("FAIL wr_ready not low during a read"); end
    drain();

    // ---- PPED vertical, 2x2 units folded: 32 adds + 32 shifts -----------
    vertical_shift("pped_vertical_units", 10, 32, 3, 32, 2);

    // ---- PPED diagonal (2x2 units) --------------------------------------
    diagonal("pped_diagonal", 100, 32, 20, 32, 4);

    // ---- CED: 4 bands of 16 rows, 16 PUs, cells of 4 PUs -----------------
    r0 = 120; s = 8;
    load_masks(s, s + 15);
    clear_region(16);
    got.delete();
    start_count();
    for (int band = 0; band < 4; band++) begin
      for (int k = 0; k < 16; k++) send(OP_ADD, r0 + 16*band + k);
      for (int m = 0; m < 16; m++) send(OP_SHIFT, 0, 1, (m % 4) != 0);
    end
    stop_count();
    check_cycles("ced", 64, 64);
    for (int band = 0; band < 4; band++)
      for (int cix = 0; cix < 4; cix++) begin
        automatic int ex = 0;
        for (int k = 0; k < 16; k++)
          for (int q = 0; q < 4; q++)
            ex += unit_cnt(r0 + 16*band + k, s + 15 - (4*cix + q));
        repeat (3) void'(got.pop_front());
        check("ced", 4*band + cix, ex);
      end

    // ---- CED with 2x2 units folded: 4 bands of 8 row groups, 32 PUs,
    // cells of 8 unit columns (16 x 16 pixels); 32 adds + 128 shifts
    for (int band = 0; band < 4; band++)
      vertical_shift("ced_units", 140 + 8*band, 8, 16, 32, 8);

    // ---- EM: eyes band and mouth band, 8 row groups each, 32 PUs --------
    s = 30;
    load_masks(s, s + 31);
    clear_region(32);
    got.delete();
    start_count();
    for (int band = 0; band < 2; band++) begin
      t = band == 0 ? 200 : 230;
      for (int k = 0; k < 8; k++) send(OP_ADD, t + k);
      for (int m = 0; m < 32; m++) send(OP_SHIFT, 0, 1, 0);
    end
    stop_count();
    check_cycles("em", 16, 64);
    for (int band = 0; band < 2; band++) begin
      t = band == 0 ? 200 : 230;
      for (int m = 0; m < 32; m++) begin
        automatic int ex = 0;
        for (int k = 0; k < 8; k++) ex += unit_cnt(t + k, s + 31 - m);
        check("em", 32*band + m, ex);
      end
    end

    // ---- Ego-motion: 32 row groups, 32 unit columns, 1 per element ------
    vertical_shift("ego_motion", 60, 32, 32, 32, 1);

    // ---- mechanisms ----------------------------------------------------
    $display("mechanisms: add=%0d shiftadd=%0d shift=%0d group=%0d mask_step=%0d region_cut=%0d write_refused=%0d",
             n_add, n_shiftadd, n_shift, n_group, n_mstep, n_cut, n_wr_block);
    checks++; if (n_add == 0)      begin failures++; $display("FAIL no add"); end
    checks++; if (n_shiftadd == 0) begin failures++; $display("FAIL no shift-add"); end
    checks++; if (n_shift == 0)    begin failures++; $display("FAIL no shift"); end
    checks++; if (n_group == 0)    begin failures++; $display("FAIL no grouping"); end
    checks++; if (n_mstep == 0)    begin failures++; $display("FAIL no mask step"); end
    checks++; if (n_cut == 0)      begin failures++; $display("FAIL no region cut"); end
    checks++; if (n_wr_block == 0) begin failures++; $display("FAIL no refused write"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
