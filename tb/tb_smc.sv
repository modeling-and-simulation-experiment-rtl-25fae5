// tb_smc: self-checking testbench for smc.
// Feeds the controller hand-made microwords and `over` values and checks the
// enables it raises in every clock of the five-clock operation cycle
// (FETCH, DECODE, SETUP, ACCESS, CHECK): first-address load at a new element,
// compare only on reads, address step after the last operation of an element
// unless `over`, stop at the end-of-test word, abort when the mode leaves
// test, and restart only after SMCEna is released.
module tb_smc;
  import mbist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, smc_ena = 1'b0, test_mode = 1'b1, srd_ena = 1'b1;
  mcode_t op = '0;
  logic over = 1'b0;
  logic inst_ena, i_ena, ir_ena, addr_ena, addr_ld, data_ena, rw_ena, mem_ena, fd_ena, rla_ena, done;
  int checks = 0, failures = 0;

  smc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected enables, in the order
  // {inst_ena, i_ena, ir_ena, addr_ena, addr_ld, data_ena, rw_ena, mem_ena, fd_ena, done}
  task automatic expect_en(input logic [9:0] e, input string what);
    logic [9:0] got;
    got = {inst_ena, i_ena, ir_ena, addr_ena, addr_ld, data_ena, rw_ena, mem_ena, fd_ena, done};
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s: %b expected %b", what, got, e); end
    @(posedge clk); #1;
  endtask

  // one operation; ld = expect first-address load, step = expect address step
  task automatic one_op(input mcode_t w, input bit ld, input bit step, input bit ov);
    expect_en(10'b0100000000, "fetch");
    op = w;   // the instruction register loads at the end of DECODE
    expect_en(10'b0010000000, "decode");
    expect_en({4'b0000, ld, 5'b11000}, "setup");
    expect_en(10'b0000000100, "access");
    over = ov;
    #1;
    expect_en({1'b1, 2'b00, step, 4'b0000, w.rd, 1'b0}, "check");
    over = 1'b0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    expect_en('0, "idle");
    smc_ena = 1'b1;
    #1;
    expect_en('0, "start");
    // single-op element w0 over two addresses: load, step, then over
    one_op(7'h7C, 1, 1, 0);
    one_op(7'h7C, 0, 0, 1);
    // three-op element: first (load at new element), in-between (read), last
    one_op(7'h5C, 1, 0, 0);
    one_op(7'h6E, 0, 0, 0);
    one_op(7'h76, 0, 1, 0);
    one_op(7'h5C, 0, 0, 0);
    one_op(7'h6E, 0, 0, 0);
    one_op(7'h76, 0, 0, 1);
    // end of test
    expect_en(10'b0100000000, "fetch end");
    op = 7'h00;
    expect_en(10'b0010000000, "decode end");
    expect_en(10'b0000000000, "setup end");
    expect_en(10'b0000000001, "done");
    expect_en(10'b0000000001, "done holds");
    checks++;
    if (rla_ena !== 1'b1) begin failures++; $display("FAIL rla_ena"); end
    smc_ena = 1'b0;
    #1;
    expect_en(10'b0000000001, "done until release");
    expect_en('0, "idle again");
    // restart and abort on mode change
    smc_ena = 1'b1;
    op = 7'h7C;
    #1;
    expect_en('0, "start 2");
    expect_en(10'b0100000000, "fetch 2");
    test_mode = 1'b0;
    #1;
    expect_en(10'b0000000000, "aborted");
    expect_en(10'b0000000000, "stays idle");
    srd_ena = 1'b0;
    #1;
    checks++;
    if (rla_ena !== 1'b0) begin failures++; $display("FAIL rla_ena off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
