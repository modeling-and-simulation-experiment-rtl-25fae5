// ip_mux: input multiplexer in front of the memory under test.
//
// In test & repair mode (ModeType = 1) the memory gets the BIST's address,
// test data, RdEna, WrEna and MemEna. In normal mode (ModeType = 2) it gets
// the external address, data and read/write strobes, with MemEna = REna|WEna.
// In the two idle codes all enables are 0. Combinational. The two-way
// selection follows the source design; the idle codes are this design's own.
module ip_mux
  import mbist_pkg::*;
#(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 1
) (
  input  mode_t             mode,
  // BIST side
  input  logic [ADDR_W-1:0] t_addr,
  input  logic [DATA_W-1:0] t_data,
  input  logic              t_rd,
  input  logic              t_wr,
  input  logic              t_mem_ena,
  // external (normal mode) side
  input  logic [ADDR_W-1:0] n_addr,
  input  logic [DATA_W-1:0] n_data,
  input  logic              n_rd,
  input  logic              n_wr,
  // to the memory
  output logic [ADDR_W-1:0] m_addr,
  output logic [DATA_W-1:0] m_data,
  output logic              m_rd,
  output logic              m_wr,
  output logic              m_mem_ena
);

  always_comb begin
    unique case (mode)
      MODE_TEST: begin
        m_addr    = t_addr;
        m_data    = t_data;
        m_rd      = t_rd;
        m_wr      = t_wr;
        m_mem_ena = t_mem_ena;
      end
      MODE_NORMAL: begin
        m_addr    = n_addr;
        m_data    = n_data;
        m_rd      = n_rd;
        m_wr      = n_wr;
        m_mem_ena = n_rd | n_wr;
      end
      default: begin
        m_addr    = n_addr;
        m_data    = n_data;
        m_rd      = 1'b0;
        m_wr      = 1'b0;
        m_mem_ena = 1'b0;
      end
    endcase
  end

endmodule
