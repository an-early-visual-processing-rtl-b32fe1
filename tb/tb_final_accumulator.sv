// tb_final_accumulator: random strobes (en), keep (RESET) and inputs
// against a reference: en with keep adds to the content, en without keep
// loads the input (adds to zero), no en holds. Also groups a stream of
// values in periods of 3 and checks each group sum.
module tb_final_accumulator;
  timeunit 1ns; timeprecision 1ps;
  logic       clk = 0, rst_n = 0, en = 0, keep = 0;
  logic [7:0] din = 0, acc, model = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  final_accumulator #(.W(8)) dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = 1'($urandom); keep = 1'($urandom); din = 8'($urandom);
      if (en) model = (keep ? model : 8'd0) + din;
      @(posedge clk); #1;
      checks++;
      if (acc !== model) begin
        failures++;
        $display("FAIL step %0d: got %0d expected %0d", i, acc, model);
      end
    end
    // periodic grouping: groups of 3 small values
    for (int g = 0; g < 20; g++) begin
      automatic int sum = 0;
      for (int k = 0; k < 3; k++) begin
        @(negedge clk);
        en = 1; keep = (k != 0); din = 8'($urandom % 50);
        sum += din;
      end
      @(negedge clk);
      en = 0;
      checks++;
      if (acc !== 8'(sum)) begin
        failures++;
        $display("FAIL group %0d: got %0d expected %0d", g, acc, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
