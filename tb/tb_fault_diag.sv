// tb_fault_diag: self-checking testbench for fault_diag.
// Random compare cycles: a fault pulse must follow exactly the enabled
// mismatches, one clock later, with the compared address and the expected
// word; `faulty` must be set from the first fault on.
module tb_fault_diag;
  logic clk = 1'b0, rst_n = 1'b0, fd_ena = 1'b0;
  logic mem_out = 1'b0, exp_data = 1'b0;
  logic [3:0] addr = '0;
  logic fault, faulty, fault_data;
  logic [3:0] fault_addr;
  logic m_fault = 1'b0, m_faulty = 1'b0, m_data = 1'b0;
  logic [3:0] m_addr = '0;
  int checks = 0, failures = 0, pulses = 0;

  fault_diag dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (fault !== 1'b0 || faulty !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      fd_ena   = 1'($urandom);
      mem_out  = 1'($urandom);
      exp_data = 1'($urandom);
      addr     = 4'($urandom);
      @(posedge clk); #1;
      m_fault = fd_ena && (mem_out != exp_data);
      if (m_fault) begin
        m_addr = addr; m_data = exp_data; m_faulty = 1'b1; pulses++;
      end
      checks++;
      if (fault !== m_fault || faulty !== m_faulty ||
          (m_faulty && (fault_addr !== m_addr || fault_data !== m_data))) begin
        failures++;
        $display("FAIL k=%0d fault=%b/%b addr=%0d/%0d data=%b/%b", k, fault, m_fault,
                 fault_addr, m_addr, fault_data, m_data);
      end
    end
    checks++;
    if (pulses == 0) begin failures++; $display("FAIL no fault exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
