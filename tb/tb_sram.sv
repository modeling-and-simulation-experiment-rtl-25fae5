// tb_sram: self-checking testbench for the sram model.
// Part 1: fault-free random reads and writes against a reference array in the
// testbench (write, registered read, data held between reads, both enables =
// no operation). Part 2: each injected fault primitive, at both sensitising
// values, driven through the operation sequence that defines it; the read
// result and the cell content afterwards (read back through a non-sensitising
// path) are compared with the fault's definition. Part 3: two words with
// different faults at once.
module tb_sram;
  import mbist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic mem_ena = 1'b0, rd_ena = 1'b0, wr_ena = 1'b0;
  logic [3:0] addr = '0;
  logic din = 1'b0, dout;
  fault_t t_type = FLT_NONE;
  logic [15:0] t_mask = '0;
  logic t_pol = 1'b0;
  fault_t [15:0] fi_type;
  logic   [15:0] fi_pol;
  logic ref_mem [16];

  logic force_two = 1'b0;

  always_comb
    for (int i = 0; i < 16; i++) begin
      fi_type[i] = t_mask[i] ? t_type : FLT_NONE;
      fi_pol[i]  = t_pol;
      if (force_two && i == 2) begin fi_type[i] = FLT_DYN_IRF; fi_pol[i] = 1'b0; end
      if (force_two && i == 9) begin fi_type[i] = FLT_WDF;     fi_pol[i] = 1'b1; end
    end
  logic last_rd;
  int checks = 0, failures = 0;

  sram dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic op(input bit rd, input bit wr, input logic [3:0] a, input logic d);
    mem_ena = 1'b1; rd_ena = rd; wr_ena = wr; addr = a; din = d;
    @(posedge clk); #1;
    mem_ena = 1'b0; rd_ena = 1'b0; wr_ena = 1'b0;
  endtask

  task automatic expect_out(input logic e, input string what);
    checks++;
    if (dout !== e) begin failures++; $display("FAIL %s: dout=%b expected %b", what, dout, e); end
  endtask

  // raw cell content, read with the fault switched off
  task automatic expect_cell(input logic [3:0] a, input logic e, input string what);
    fault_t keep = t_type;
    t_type = FLT_NONE;
    op(1, 0, a, 0);
    expect_out(e, {what, " (cell)"});
    t_type = keep;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int a = 0; a < 16; a++) begin op(0, 1, 4'(a), 1'(a)); ref_mem[a] = 1'(a); end
    op(1, 0, 4'd0, 1'b0);
    last_rd = ref_mem[0];
    for (int k = 0; k < 600; k++) begin
      automatic logic [3:0] a = 4'($urandom);
      automatic logic d = 1'($urandom);
      automatic int kind = $urandom_range(0, 3);
      if (kind == 0)      begin op(0, 1, a, d); ref_mem[a] = d; end
      else if (kind == 1) begin op(1, 0, a, d); last_rd = ref_mem[a]; end
      else if (kind == 2) begin op(1, 1, a, d); end          // both: no operation
      else                begin @(posedge clk); #1; end      // idle
      expect_out(last_rd, "random");
    end
    // fault primitives, both polarities
    for (int p = 0; p < 2; p++) begin
      automatic logic v = 1'(p);
      t_pol  = v;
      t_mask = 16'h0010;   // word 4 is faulty
      // WDF: non-transition write flips; a transition write does not
      t_type = FLT_WDF;
      t_type = FLT_NONE; op(0, 1, 4, v); t_type = FLT_WDF;
      op(0, 1, 4, v);  expect_cell(4, ~v, "WDF non-transition write");
      t_type = FLT_NONE; op(0, 1, 4, ~v); t_type = FLT_WDF;
      op(0, 1, 4, v);  expect_cell(4, v, "WDF transition write");
      op(0, 1, 5, v);  expect_cell(5, v, "WDF healthy word");
      // DRDF: read correct, cell flips
      t_type = FLT_NONE; op(0, 1, 4, v); op(1, 0, 7, 0); t_type = FLT_DRDF;
      op(1, 0, 4, 0);  expect_out(v, "DRDF read");
      expect_cell(4, ~v, "DRDF");
      // dRDF: write then read: cell flips, read wrong
      t_type = FLT_DYN_RDF;
      op(0, 1, 4, v);  op(1, 0, 4, 0); expect_out(~v, "dRDF read");
      expect_cell(4, ~v, "dRDF");
      // not immediately after the write: no fault
      op(0, 1, 4, v);  op(1, 0, 6, 0); op(1, 0, 4, 0); expect_out(v, "dRDF delayed read");
      expect_cell(4, v, "dRDF delayed");
      // dDRDF: write then read: cell flips, read correct
      t_type = FLT_DYN_DRDF;
      op(0, 1, 4, v);  op(1, 0, 4, 0); expect_out(v, "dDRDF read");
      expect_cell(4, ~v, "dDRDF");
      // dIRF: write then read: read wrong, cell kept
      t_type = FLT_DYN_IRF;
      op(0, 1, 4, v);  op(1, 0, 4, 0); expect_out(~v, "dIRF read");
      expect_cell(4, v, "dIRF");
      // other polarity does not sensitise
      t_type = FLT_DYN_IRF;
      op(0, 1, 4, ~v); op(1, 0, 4, 0); expect_out(~v, "dIRF other value");
    end
    // two different faults in one memory: word 2 dIRF at 0, word 9 WDF at 1
    t_mask = '0;
    t_type = FLT_NONE;
    op(0, 1, 2, 0); op(0, 1, 9, 1);
    force_two = 1'b1;
    op(0, 1, 2, 0); op(1, 0, 2, 0); expect_out(1'b1, "mixed: dIRF word");
    op(0, 1, 9, 1); expect_cell(9, 1'b0, "mixed: WDF word");
    op(0, 1, 5, 0); op(1, 0, 5, 0); expect_out(1'b0, "mixed: healthy word");
    force_two = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
