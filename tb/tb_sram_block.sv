// tb_sram_block: writes random rows into a 256 x 32 block through one-hot
// word lines and reads them back in random order, checking the registered
// read data (valid the cycle after the read), that rdata holds between
// reads, and that a cycle with both we and re high writes only.
module tb_sram_block;
  timeunit 1ns; timeprecision 1ps;
  localparam int ROWS = 256, CW = 32;
  logic            clk = 0;
  logic [ROWS-1:0] wl = '0;
  logic            we = 0, re = 0;
  logic [CW-1:0]   wdata = '0, rdata;
  logic [CW-1:0]   model [ROWS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  sram_block #(.ROWS(ROWS), .CW(CW)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [CW-1:0] exp_v, string what);
    checks++;
    if (rdata !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rdata, exp_v);
    end
  endtask

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      model[r] = $urandom;
      wl = ROWS'(1) << r; we = 1; wdata = model[r];
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 600; i++) begin
      automatic int r = $urandom % ROWS;
      @(negedge clk);
      wl = ROWS'(1) << r; re = 1;
      @(negedge clk);
      re = 0; wl = '0;
      chk(model[r], "read");
      @(negedge clk);
      chk(model[r], "hold");
    end
    // we and re together: write wins, rdata unchanged
    begin
      automatic logic [CW-1:0] prev_rd = rdata;
      automatic logic [CW-1:0] nv = ~model[7];
      @(negedge clk);
      wl = ROWS'(1) << 7; we = 1; re = 1; wdata = nv;
      @(negedge clk);
      we = 0; re = 0;
      chk(prev_rd, "write wins");
      model[7] = nv;
      re = 1;
      @(negedge clk);
      re = 0;
      chk(model[7], "read after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
