// tb_addr_gen: self-checking testbench for addr_gen.
// Loads the start address for both orders, steps through the whole range,
// checks the address and `over` against a counter kept in the testbench,
// checks that the address holds without addr_ena, and the wrap-around.
module tb_addr_gen;
  logic clk = 1'b0, rst_n = 1'b0, addr_ena = 1'b0, addr_ld = 1'b0, inc = 1'b1;
  logic [3:0] addr;
  logic over;
  int checks = 0, failures = 0;
  int model;

  addr_gen dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what);
    checks++;
    if (addr !== 4'(model) || over !== (inc ? model == 15 : model == 0)) begin
      failures++;
      $display("FAIL %s: addr=%0d over=%b model=%0d inc=%b", what, addr, over, model, inc);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    model = 0;
    check("reset");
    rst_n = 1'b1;
    for (int pass = 0; pass < 4; pass++) begin
      inc = pass[0] ? 1'b0 : 1'b1;
      addr_ld = 1'b1;
      @(posedge clk); #1;
      addr_ld = 1'b0;
      model = inc ? 0 : 15;
      check("load");
      for (int k = 0; k < 20; k++) begin
        addr_ena = 1'b1;
        @(posedge clk); #1;
        addr_ena = 1'b0;
        model = inc ? (model + 1) % 16 : (model + 15) % 16;
        check("step");
        @(posedge clk); #1;
        check("hold");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
