// tb_output_mux: self-checking testbench for output_mux at an 8-bit word:
// the redundant data is passed exactly when `hit` is set.
module tb_output_mux;
  logic       hit;
  logic [7:0] rla_data, mem_out, dout;
  int checks = 0, failures = 0;

  output_mux #(.DATA_W(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      hit = 1'($urandom); rla_data = 8'($urandom); mem_out = 8'($urandom);
      #1;
      checks++;
      if (dout !== (hit ? rla_data : mem_out)) begin
        failures++;
        $display("FAIL hit=%b rla=%h mem=%h out=%h", hit, rla_data, mem_out, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
