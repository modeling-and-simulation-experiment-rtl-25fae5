// tb_data_gen: self-checking testbench for data_gen, at the default 1-bit
// word and at an 8-bit word: the word is all ones or all zeros after a load,
// holds without data_ena and resets to zero.
module tb_data_gen;
  logic clk = 1'b0, rst_n = 1'b0, data_ena = 1'b0, dbit = 1'b0;
  logic       d1;
  logic [7:0] d8;
  logic       model = 1'b0;
  int checks = 0, failures = 0;

  data_gen                u1 (.clk, .rst_n, .data_ena, .dbit, .data(d1));
  data_gen #(.DATA_W(8))  u8 (.clk, .rst_n, .data_ena, .dbit, .data(d8));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (d1 !== model || d8 !== {8{model}}) begin
      failures++;
      $display("FAIL d1=%b d8=%h model=%b", d1, d8, model);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    check();
    rst_n = 1'b1;
    for (int k = 0; k < 200; k++) begin
      dbit = 1'($urandom);
      data_ena = 1'($urandom);
      @(posedge clk); #1;
      if (data_ena) model = dbit;
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
