// tb_processing_unit: random sequences of add / shift / hold on one PU
// against a reference model: add adds the number of set flags, shift takes
// shift_in or 0 (input mask 0), hold keeps; down equals the sum only when
// the output mask is 1. Sums wrap at 8 bits.
module tb_processing_unit;
  timeunit 1ns; timeprecision 1ps;
  import edge_cache_pkg::*;
  logic       clk = 0, rst_n = 0;
  pu_op_e     op = PU_HOLD;
  logic [3:0] flags = 0;
  logic [7:0] shift_in = 0, shift_out, down;
  logic       inmsk = 0, outmsk = 0;
  logic [7:0] model = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  processing_unit dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      op       = pu_op_e'($urandom % 3);
      flags    = 4'($urandom);
      shift_in = 8'($urandom);
      inmsk    = 1'($urandom);
      outmsk   = 1'($urandom);
      case (op)
        PU_ADD:   model = model + 8'($countones(flags));
        PU_SHIFT: model = inmsk ? shift_in : 8'd0;
        default: ;
      endcase
      @(posedge clk); #1;
      checks++;
      if (shift_out !== model || down !== (outmsk ? model : 8'd0)) begin
        failures++;
        $display("FAIL step %0d op=%s: sum %0d down %0d expected %0d",
                 i, op.name(), shift_out, down, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
