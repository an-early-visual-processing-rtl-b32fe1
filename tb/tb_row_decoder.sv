// tb_row_decoder: exhaustive test of the 8-to-256 word-line decoder.
// For every address, with the enable high, exactly word line addr must be
// set; with the enable low, none.
module tb_row_decoder;
  timeunit 1ns; timeprecision 1ps;
  logic         en;
  logic [7:0]   addr;
  logic [255:0] wl;
  int checks = 0, failures = 0;

  row_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < 256; a++) begin
        en = e[0]; addr = 8'(a);
        #1;
        checks++;
        if (wl !== (e ? (256'(1) << a) : '0)) begin
          failures++;
          $display("FAIL en=%0d addr=%0d wl=%h", e, a, wl);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
