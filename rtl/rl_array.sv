// rl_array: redundant logic array, the repair store of the BISR.
//
// N_RED redundant words sit beside the memory. Each word has three fields:
// FA (fault asserted, the word is in use), the faulty address, and a data
// field. A comparator matches an address against every word in use.
//
// Test & repair mode: each fault pulse from fault diagnosis programs a word
// with the failing address and the correct data. Words fill in order; a pulse
// for an address already stored only refreshes that word's data. A pulse that
// finds every word in use sets `overflow` (sticky until reset): the memory can
// no longer be fully repaired.
// Normal mode: a write whose address matches a stored word also writes its
// data field (IE); a read whose address matches registers the word's data on
// rd_data and sets `hit` (OE), one clock after the read, in step with the
// SRAM's registered read, so the output multiplexer picks the redundant word.
// `hit` is cleared outside normal mode and by a read that does not match.
// `ena` (RLAEna) disables both programming and substitution.
// Word organisation, overflow and the two modes follow the source design; the
// word count, fill order and duplicate handling are this design's own.
// Asynchronous active-low reset empties the array.
module rl_array #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 1,
  parameter int unsigned N_RED  = 4,
  localparam int unsigned CNT_W = $clog2(N_RED + 1),
  localparam int unsigned IDX_W = (N_RED > 1) ? $clog2(N_RED) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ena,
  input  logic              test_mode,
  input  logic              normal_mode,
  // programming interface from fault diagnosis
  input  logic              fault,
  input  logic [ADDR_W-1:0] fault_addr,
  input  logic [DATA_W-1:0] fault_data,
  // normal-mode access
  input  logic [ADDR_W-1:0] n_addr,
  input  logic [DATA_W-1:0] n_data,
  input  logic              n_rd,
  input  logic              n_wr,
  // outputs
  output logic              hit,
  output logic [DATA_W-1:0] rd_data,
  output logic              overflow,
  output logic [CNT_W-1:0]  used
);

  logic [N_RED-1:0]  fa;
  logic [ADDR_W-1:0] faddr [N_RED];
  logic [DATA_W-1:0] fdata [N_RED];

  // comparators
  logic [N_RED-1:0] m_prog, m_norm;
  logic             any_prog, any_norm;
  logic [IDX_W-1:0] i_prog, i_norm;
  logic [IDX_W-1:0] i_free;
  assign i_free = IDX_W'(used);

  always_comb begin
    i_prog = '0;
    i_norm = '0;
    for (int unsigned i = 0; i < N_RED; i++) begin
      m_prog[i] = fa[i] && (faddr[i] == fault_addr);
      m_norm[i] = fa[i] && (faddr[i] == n_addr);
      if (m_prog[i]) i_prog = IDX_W'(i);
      if (m_norm[i]) i_norm = IDX_W'(i);
    end
    any_prog = |m_prog;
    any_norm = |m_norm;
  end

  logic prog, n_write, n_read;
  assign prog    = ena && test_mode && fault;
  assign n_write = ena && normal_mode && n_wr && !n_rd;
  assign n_read  = ena && normal_mode && n_rd && !n_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fa       <= '0;
      used     <= '0;
      overflow <= 1'b0;
      hit      <= 1'b0;
      rd_data  <= '0;
      for (int unsigned i = 0; i < N_RED; i++) begin
        faddr[i] <= '0;
        fdata[i] <= '0;
      end
    end else begin
      if (prog) begin
        if (any_prog) begin
          fdata[i_prog] <= fault_data;
        end else if (32'(used) < N_RED) begin
          fa[i_free]    <= 1'b1;
          faddr[i_free] <= fault_addr;
          fdata[i_free] <= fault_data;
          used        <= used + 1'b1;
        end else begin
          overflow <= 1'b1;
        end
      end
      if (n_write && any_norm) fdata[i_norm] <= n_data;
      if (!(ena && normal_mode)) begin
        hit <= 1'b0;
      end else if (n_read) begin
        hit     <= any_norm;
        rd_data <= fdata[i_norm];
      end
    end
  end

endmodule
