// tb_ip_mux: self-checking testbench for ip_mux: random inputs in all four
// ModeType codes; test mode passes the BIST side, normal mode the external
// side with MemEna = REna|WEna, the idle codes disable the memory.
module tb_ip_mux;
  import mbist_pkg::*;
  mode_t      mode;
  logic [3:0] t_addr, n_addr, m_addr;
  logic       t_data, n_data, m_data;
  logic       t_rd, t_wr, t_mem_ena, n_rd, n_wr, m_rd, m_wr, m_mem_ena;
  int checks = 0, failures = 0;

  ip_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 400; k++) begin
      mode = mode_t'(k % 4);
      {t_addr, n_addr} = 8'($urandom);
      {t_data, n_data, t_rd, t_wr, t_mem_ena, n_rd, n_wr} = 7'($urandom);
      #1;
      checks++;
      case (k % 4)
        1: if ({m_addr, m_data, m_rd, m_wr, m_mem_ena} !== {t_addr, t_data, t_rd, t_wr, t_mem_ena}) begin
             failures++; $display("FAIL test mode");
           end
        2: if ({m_addr, m_data, m_rd, m_wr, m_mem_ena} !== {n_addr, n_data, n_rd, n_wr, n_rd | n_wr}) begin
             failures++; $display("FAIL normal mode");
           end
        default: if ({m_rd, m_wr, m_mem_ena} !== 3'b000) begin
             failures++; $display("FAIL idle mode");
           end
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
