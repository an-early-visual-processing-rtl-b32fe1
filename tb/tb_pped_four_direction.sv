// tb_pped_four_direction: the full 64-element PPED feature vector of a
// 64 x 64 window, produced by four edge-flag cache engines working in
// parallel, one per edge direction.
//
// Four random 64 x 64 edge maps stand for the horizontal, vertical, +45
// and -45 degree flags. Each is stored as 2x2 units: the vertical map as it
// is, the horizontal map transposed (rotated), the +45 map as it is and
// the -45 map mirrored left-right, so that the engines only ever do
// vertical or one kind of diagonal projection. Every element is checked
// against a sum taken directly over the pixel maps: 4-column slots for
// vertical, 4-row slots for horizontal, slots of 8 unit diagonals (4
// diagonals of 2x2 units) for the two diagonal maps. Each engine's
// projection must take 32 long + 32 short cycles (96 clock cycles), and
// the four must run at the same time.
module tb_pped_four_direction;
  timeunit 1ns; timeprecision 1ps;

  logic clk = 0, rst_n = 0, start = 0;
  always #5 clk = ~clk;

  logic         pix [4][64][64];         // 0 H, 1 V, 2 +45, 3 -45
  logic [255:0] img [4][256];
  logic         done [4];
  logic [7:0]   elem [4][16];
  int           cycles [4];
  int checks = 0, failures = 0;

  pped_lane #(.MODE(0)) u_h  (.clk, .rst_n, .start, .image(img[0]), .done(done[0]), .elem(elem[0]), .cycles(cycles[0]));
  pped_lane #(.MODE(0)) u_v  (.clk, .rst_n, .start, .image(img[1]), .done(done[1]), .elem(elem[1]), .cycles(cycles[1]));
  pped_lane #(.MODE(1)) u_dp (.clk, .rst_n, .start, .image(img[2]), .done(done[2]), .elem(elem[2]), .cycles(cycles[2]));
  pped_lane #(.MODE(1)) u_dm (.clk, .rst_n, .start, .image(img[3]), .done(done[3]), .elem(elem[3]), .cycles(cycles[3]));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // store map p (already rotated / mirrored) as 2x2 units in columns
  // 64..191 (PUs 16..47); the other columns hold unrelated random flags
  function automatic void fold(int d, logic p [64][64]);
    for (int r = 0; r < 256; r++) img[d][r] = {8{$urandom}};
    for (int k = 0; k < 32; k++)
      for (int u = 0; u < 32; u++) begin
        img[d][k][64 + 4*u + 0] = p[2*k][2*u];
        img[d][k][64 + 4*u + 1] = p[2*k][2*u + 1];
        img[d][k][64 + 4*u + 2] = p[2*k + 1][2*u];
        img[d][k][64 + 4*u + 3] = p[2*k + 1][2*u + 1];
      end
  endfunction

  initial begin
    logic t [64][64];
    int   ref_v [4][16];
    for (int d = 0; d < 4; d++)
      for (int y = 0; y < 64; y++)
        for (int x = 0; x < 64; x++)
          pix[d][y][x] = ($urandom % 100) < 25;

    // memory layouts
    for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) t[x][y] = pix[0][y][x];
    fold(0, t);                                  // horizontal, transposed
    for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) t[y][x] = pix[1][y][x];
    fold(1, t);                                  // vertical
    for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) t[y][x] = pix[2][y][x];
    fold(2, t);                                  // +45
    for (int y = 0; y < 64; y++) for (int x = 0; x < 64; x++) t[y][x] = pix[3][y][63 - x];
    fold(3, t);                                  // -45, mirrored

    // reference PPED from the pixel maps, in the engines' output order
    foreach (ref_v[d, i]) ref_v[d][i] = 0;
    for (int y = 0; y < 64; y++)
      for (int x = 0; x < 64; x++) begin
        ref_v[0][15 - y/4] += int'(pix[0][y][x]);          // 4-row slots
        ref_v[1][15 - x/4] += int'(pix[1][y][x]);          // 4-column slots
        ref_v[2][(31 - x/2 + y/2) / 4] += int'(pix[2][y][x]);
        ref_v[3][(31 - (63 - x)/2 + y/2) / 4] += int'(pix[3][y][x]);
      end

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    start = 1;
    wait (done[0] && done[1] && done[2] && done[3]);
    @(posedge clk);

    for (int d = 0; d < 4; d++) begin
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (elem[d][i] != 8'(ref_v[d][i])) begin
          failures++;
          $display("FAIL map %0d element %0d: got %0d expected %0d", d, i, elem[d][i], ref_v[d][i]);
        end
      end
      checks++;
      if (cycles[d] != 96) begin
        failures++;
        $display("FAIL map %0d: projection took %0d cycles, expected 96", d, cycles[d]);
      end
    end
    $display("four-direction PPED: 64 elements, %0d cycles per engine (48 clk), engines in parallel", cycles[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
