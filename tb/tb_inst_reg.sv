// tb_inst_reg: self-checking testbench for inst_reg.
// Loads random words, checks every decoded field against the bit positions of
// the microword layout, that the register holds without ir_ena, and reset.
module tb_inst_reg;
  import mbist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, ir_ena = 1'b0;
  logic [6:0] inst = '0, held;
  mcode_t op;
  int checks = 0, failures = 0;

  inst_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_fields(input logic [6:0] e);
    checks++;
    if (op.valid !== e[6] || op.fo_n !== e[5] || op.io_n !== e[4] || op.lo_n !== e[3] ||
        op.inc !== e[2] || op.rd !== e[1] || op.data !== e[0]) begin
      failures++;
      $display("FAIL op=%b expected %b", op, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    check_fields(7'h00);
    rst_n = 1'b1;
    held = '0;
    for (int k = 0; k < 200; k++) begin
      inst   = 7'($urandom);
      ir_ena = 1'($urandom);
      @(posedge clk); #1;
      if (ir_ena) held = inst;
      check_fields(held);
    end
    rst_n = 1'b0;
    #1 check_fields(7'h00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
