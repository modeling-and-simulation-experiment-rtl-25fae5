// fault_diag: fault diagnosis of the BIST.
//
// In a clock with fd_ena high (the compare cycle of a read operation) it
// compares the word read from the memory with the expected test word. On a
// mismatch it raises `fault` for one clock in the next cycle, together with
// the failing address and the expected (correct) word: the three signals the
// redundant logic array is programmed from. fault_addr and fault_data hold
// the last failure; `faulty` stays set once any fault was seen. The compare
// and the three interface signals follow the source design; the one-clock
// registered output and the sticky flag are this design's choice.
// Asynchronous active-low reset.
module fault_diag #(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              fd_ena,
  input  logic [DATA_W-1:0] mem_out,
  input  logic [DATA_W-1:0] exp_data,
  input  logic [ADDR_W-1:0] addr,
  output logic              fault,
  output logic [ADDR_W-1:0] fault_addr,
  output logic [DATA_W-1:0] fault_data,
  output logic              faulty
);

  logic mismatch;
  assign mismatch = fd_ena && (mem_out != exp_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fault      <= 1'b0;
      fault_addr <= '0;
      fault_data <= '0;
      faulty     <= 1'b0;
    end else begin
      fault <= mismatch;
      if (mismatch) begin
        fault_addr <= addr;
        fault_data <= exp_data;
        faulty     <= 1'b1;
      end
    end
  end

endmodule
