// tb_mask_register: shifts random bits through an 8-bit mask chain with a
// random shift enable and compares q and sout with a reference shift
// register; also checks the reset value.
module tb_mask_register;
  timeunit 1ns; timeprecision 1ps;
  logic       clk = 0, rst_n = 0, shift = 0, sin = 0, sout;
  logic [7:0] q, model = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  mask_register #(.N(8)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 8'd0) begin failures++; $display("FAIL reset"); end
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      shift = 1'($urandom);
      sin   = 1'($urandom);
      if (shift) model = {model[6:0], sin};
      @(posedge clk); #1;
      checks++;
      if (q !== model || sout !== model[7]) begin
        failures++;
        $display("FAIL step %0d: q=%b expected %b", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
