// tb_or_selector: with one random input non-zero and the others zero the
// output must equal that input; with random inputs it must be their OR.
module tb_or_selector;
  timeunit 1ns; timeprecision 1ps;
  logic [7:0] din [8];
  logic [7:0] dout, ex;
  int checks = 0, failures = 0;

  or_selector #(.N(8), .W(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      automatic int sel = $urandom % 8;
      ex = 0;
      for (int k = 0; k < 8; k++) begin
        din[k] = (i < 250) ? ((k == sel) ? 8'($urandom) : 8'd0) : 8'($urandom);
        ex |= din[k];
      end
      #1;
      checks++;
      if (dout !== ex || (i < 250 && dout !== din[sel])) begin
        failures++;
        $display("FAIL %0d: got %h expected %h", i, dout, ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
