// pped_lane: testbench helper holding one edge-flag cache engine and the
// command sequence that computes a 16-element PPED part from a 64 x 64
// edge map stored as 2x2 units (32 memory rows x 128 columns).
//
// On start it writes the prepared memory image, loads the region masks
// (PUs S..S+31, so the region starts and ends inside the chip and is
// surrounded by other flags), clears the region and runs either
//   MODE 0, vertical: 32 adds, 32 captured shifts, elements of 2 unit
//           columns (4 pixel columns), output right to left;
//   MODE 1, diagonal: 1 add, 31 shift-adds, 32 shifts, 63 diagonal sums
//           grouped by 4.
// elem[i] is the i-th element in output order; cycles is the number of
// clock cycles of the projection itself (masks and writes excluded).
module pped_lane
  import edge_cache_pkg::*;
#(
  parameter int MODE = 0,
  parameter int S    = 16     // first PU of the region
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [255:0] image [256],
  output logic         done,
  output logic [7:0]   elem [16],
  output int           cycles
);
  logic         wr_en = 0, wr_ready, cmd_valid = 0, cmd_ready, busy, vec_valid;
  logic [7:0]   wr_row = 0;
  logic [255:0] wr_data = '0;
  cmd_t         cmd = '0;
  logic [7:0]   vec_out, sel_out;

  edge_cache_top u_dut (.*);

  logic [7:0] got [$];
  bit counting = 0;
  always @(posedge clk) if (vec_valid) got.push_back(vec_out);
  always @(posedge clk) if (counting && busy) cycles++;

  task automatic send(op_e op, int row = 0, bit cap = 0, bit keep = 0,
                      bit mshift = 0, bit imsk = 0, bit omsk = 0);
    @(negedge clk);
    cmd.op = op; cmd.row = 8'(row); cmd.cap = cap; cmd.keep = keep;
    cmd.mshift = mshift; cmd.imsk_in = imsk; cmd.omsk_in = omsk;
    cmd_valid = 1;
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
  endtask

  task automatic drain();
    @(negedge clk);
    cmd_valid = 0;
    while (busy) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    done = 0; cycles = 0;
    foreach (elem[i]) elem[i] = 0;
    wait (start);
    for (int r = 0; r < 32; r++) begin
      @(negedge clk);
      wr_en = 1; wr_row = 8'(r); wr_data = image[r];
      @(posedge clk);
    end
    @(negedge clk);
    wr_en = 0;
    for (int t = 0; t < 64; t++) begin
      automatic int g = 63 - t;
      send(OP_HOLD, 0, 0, 0, 1, (g > S && g <= S + 31), (g == S + 31));
    end
    for (int t = 0; t < 32; t++) send(OP_SHIFT);
    drain();
    got.delete();
    counting = 1;
    if (MODE == 0) begin
      for (int k = 0; k < 32; k++) send(OP_ADD, k);
      for (int m = 0; m < 32; m++) send(OP_SHIFT, 0, 1, (m % 2) != 0);
    end else begin
      send(OP_ADD, 0);
      for (int k = 1; k < 32; k++) send(OP_SHIFTADD, k, 1, ((k-1) % 4) != 0);
      for (int m = 31; m < 63; m++) send(OP_SHIFT, 0, 1, (m % 4) != 0);
    end
    drain();
    counting = 0;
    // keep the last capture of each group
    for (int i = 0; i < 16; i++) begin
      automatic int per = (MODE == 0) ? 2 : 4;
      automatic int n   = (MODE == 1 && i == 15) ? 3 : per;
      repeat (n - 1) void'(got.pop_front());
      elem[i] = got.pop_front();
    end
    done = 1;
  end
endmodule
