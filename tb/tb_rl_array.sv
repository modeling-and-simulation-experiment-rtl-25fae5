// tb_rl_array: self-checking testbench for rl_array (4 redundant words).
// Programs faults in test mode, including a repeated address (must not take a
// second word) and a fifth address (overflow); then in normal mode checks that
// reads of repaired addresses hit with the stored data one clock later,
// that writes update the redundant word, that other addresses miss, and that
// ena = 0 blocks programming and substitution.
module tb_rl_array;
  logic clk = 1'b0, rst_n = 1'b0, ena = 1'b1, test_mode = 1'b1, normal_mode = 1'b0;
  logic fault = 1'b0;
  logic [3:0] fault_addr = '0, n_addr = '0;
  logic fault_data = 1'b0, n_data = 1'b0, n_rd = 1'b0, n_wr = 1'b0;
  logic hit, rd_data, overflow;
  logic [2:0] used;
  logic m_valid [16];
  logic m_data [16];
  int checks = 0, failures = 0;

  rl_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (hit=%b data=%b used=%0d ovf=%b)", what, hit, rd_data, used, overflow); end
  endtask

  task automatic prog_word(input logic [3:0] a, input logic d);
    fault = 1'b1; fault_addr = a; fault_data = d;
    @(posedge clk); #1;
    fault = 1'b0;
    @(posedge clk); #1;
  endtask

  task automatic nread(input logic [3:0] a);
    n_rd = 1'b1; n_addr = a;
    @(posedge clk); #1;
    n_rd = 1'b0;
  endtask

  task automatic nwrite(input logic [3:0] a, input logic d);
    n_wr = 1'b1; n_addr = a; n_data = d;
    @(posedge clk); #1;
    n_wr = 1'b0;
  endtask

  initial begin
    foreach (m_valid[i]) begin m_valid[i] = 1'b0; m_data[i] = 1'b0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(used == 0 && !overflow && !hit, "reset");
    // ena low: no programming
    ena = 1'b0;
    prog_word(4'd9, 1'b1);
    check(used == 0, "no programming while disabled");
    ena = 1'b1;
    prog_word(4'd3, 1'b1);  m_valid[3] = 1; m_data[3] = 1;
    check(used == 1, "first word");
    prog_word(4'd3, 1'b0);  m_data[3] = 0;
    check(used == 1, "repeated address keeps one word");
    prog_word(4'd12, 1'b1); m_valid[12] = 1; m_data[12] = 1;
    prog_word(4'd0, 1'b0);  m_valid[0] = 1;  m_data[0] = 0;
    prog_word(4'd7, 1'b1);  m_valid[7] = 1;  m_data[7] = 1;
    check(used == 4 && !overflow, "array full, no overflow yet");
    prog_word(4'd15, 1'b1);
    check(used == 4 && overflow, "overflow");
    // normal mode
    test_mode = 1'b0; normal_mode = 1'b1;
    for (int a = 0; a < 16; a++) begin
      nread(4'(a));
      check(hit == m_valid[a] && (!m_valid[a] || rd_data == m_data[a]), $sformatf("read %0d", a));
    end
    for (int k = 0; k < 100; k++) begin
      automatic logic [3:0] a = 4'($urandom);
      automatic logic d = 1'($urandom);
      if ($urandom_range(0, 1) == 0) begin
        logic hit_before;
        hit_before = hit;
        nwrite(a, d);
        if (m_valid[a]) m_data[a] = d;
        check(hit == hit_before, "a write keeps the last read's selection");
      end else begin
        nread(a);
        check(hit == m_valid[a] && (!m_valid[a] || rd_data == m_data[a]), $sformatf("random read %0d", a));
      end
    end
    // fault pulses in normal mode do not program
    prog_word(4'd15, 1'b0);
    nread(4'd15);
    check(!hit, "no programming in normal mode");
    // disabled: no substitution
    ena = 1'b0;
    nread(4'd3);
    check(!hit, "no substitution while disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
