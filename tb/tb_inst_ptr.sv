// tb_inst_ptr: self-checking testbench for inst_ptr.
// Walks the element structure of the default March program (element start
// and length) over N test addresses, driving the position flags and `over`
// as the rest of the BIST would, and checks every InstAddr against the
// expected walk: all operations of an element at one address, the element
// repeated until the last address, then the next element. Also checks that
// the pointer holds without inst_ena and resets to 0.
module tb_inst_ptr;
  logic clk = 1'b0, rst_n = 1'b0;
  logic inst_ena = 1'b0, over = 1'b0, fo_n = 1'b1, io_n = 1'b1, lo_n = 1'b1;
  logic [3:0] inst_addr;
  int checks = 0, failures = 0;

  inst_ptr dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [3:0] exp, input string what);
    checks++;
    if (inst_addr !== exp) begin
      failures++;
      $display("FAIL %s: inst_addr=%0d expected %0d", what, inst_addr, exp);
    end
  endtask

  localparam int NA = 5;               // test addresses
  int starts[6] = '{0, 1, 4, 7, 10, 13};
  int lens[6]   = '{1, 3, 3, 3, 3, 1};

  initial begin
    repeat (2) @(posedge clk);
    #1 check(4'd0, "reset");
    rst_n = 1'b1;
    for (int e = 0; e < 6; e++) begin
      for (int a = 0; a < NA; a++) begin
        for (int j = 0; j < lens[e]; j++) begin
          check(4'(starts[e] + j), $sformatf("elem %0d addr %0d op %0d", e, a, j));
          // flags of the word being executed
          if (lens[e] == 1)           {fo_n, io_n, lo_n} = 3'b111;
          else if (j == 0)            {fo_n, io_n, lo_n} = 3'b011;
          else if (j == lens[e] - 1)  {fo_n, io_n, lo_n} = 3'b110;
          else                        {fo_n, io_n, lo_n} = 3'b101;
          over = (a == NA - 1);
          // a few idle clocks: the pointer must hold
          inst_ena = 1'b0;
          @(posedge clk); #1;
          check(4'(starts[e] + j), "hold");
          inst_ena = 1'b1;
          @(posedge clk); #1;
          inst_ena = 1'b0;
        end
      end
    end
    check(4'd14, "end of program");
    rst_n = 1'b0;
    #1 check(4'd0, "async reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
