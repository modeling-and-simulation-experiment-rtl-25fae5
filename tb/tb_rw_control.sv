// tb_rw_control: self-checking testbench for rw_control: RdEna/WrEna follow
// the R/W bit on rw_ena, hold otherwise, and reset to zero.
module tb_rw_control;
  logic clk = 1'b0, rst_n = 1'b0, rw_ena = 1'b0, rw = 1'b0;
  logic rd_ena, wr_ena;
  logic m_rd = 1'b0, m_wr = 1'b0;
  int checks = 0, failures = 0;

  rw_control dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (rd_ena !== m_rd || wr_ena !== m_wr) begin
      failures++;
      $display("FAIL rd=%b wr=%b expected %b %b", rd_ena, wr_ena, m_rd, m_wr);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    check();
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      rw = 1'($urandom);
      rw_ena = 1'($urandom);
      @(posedge clk); #1;
      if (rw_ena) begin m_rd = rw; m_wr = !rw; end
      check();
    end
    rst_n = 1'b0;
    #1 m_rd = 1'b0; m_wr = 1'b0;
    check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
