// tb_inst_storage: self-checking testbench for inst_storage.
// Checks every location of the default program against the March test
// written out field by field (Valid, Fo, Io, Lo, I/D, R/W, Data), the one-clock
// fetch latency, holding without i_ena, and a second instance loaded with a
// different program.
module tb_inst_storage;
  import mbist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, i_ena = 1'b0;
  logic [3:0] inst_addr = '0;
  logic [6:0] inst, inst2;
  int checks = 0, failures = 0;

  localparam prog_t ALT = '{7'h7D, 7'h7B, 7'h00, 7'h00, 7'h00, 7'h00, 7'h00, 7'h00,
                            7'h00, 7'h00, 7'h00, 7'h00, 7'h00, 7'h00, 7'h00, 7'h00};

  inst_storage dut (.clk, .rst_n, .i_ena, .inst_addr, .inst);
  inst_storage #(.PROGRAM(ALT)) dut2 (.clk, .rst_n, .i_ena, .inst_addr, .inst(inst2));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {valid, fo, io, lo, up, read, data}
  function automatic logic [6:0] w(bit f, bit i, bit l, bit up, bit rd, bit d);
    return {1'b1, f, i, l, up, rd, d};
  endfunction

  logic [6:0] exp [16];

  initial begin
    exp[0]  = w(1,1,1, 1,0,0);                                   // M0 up w0
    exp[1]  = w(0,1,1, 1,0,0); exp[2]  = w(1,0,1, 1,1,0); exp[3]  = w(1,1,0, 1,1,0); // M1
    exp[4]  = w(0,1,1, 1,0,1); exp[5]  = w(1,0,1, 1,1,1); exp[6]  = w(1,1,0, 1,1,1); // M2
    exp[7]  = w(0,1,1, 0,0,1); exp[8]  = w(1,0,1, 0,1,1); exp[9]  = w(1,1,0, 0,1,1); // M3
    exp[10] = w(0,1,1, 0,0,0); exp[11] = w(1,0,1, 0,1,0); exp[12] = w(1,1,0, 0,1,0); // M4
    exp[13] = w(1,1,1, 0,1,0);                                   // M5 down r0
    exp[14] = 7'h00; exp[15] = 7'h00;
    repeat (2) @(posedge clk);
    checks++; if (inst !== 7'h00) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int a = 0; a < 16; a++) begin
      inst_addr = 4'(a);
      i_ena = 1'b1;
      @(posedge clk); #1;
      i_ena = 1'b0;
      checks++;
      if (inst !== exp[a]) begin failures++; $display("FAIL addr %0d: %h expected %h", a, inst, exp[a]); end
      checks++;
      if (inst2 !== ALT[a]) begin failures++; $display("FAIL alt addr %0d", a); end
      inst_addr = 4'(a + 5);
      @(posedge clk); #1;
      checks++;
      if (inst !== exp[a]) begin failures++; $display("FAIL hold addr %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
