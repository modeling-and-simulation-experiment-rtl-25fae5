// inst_ptr: instruction pointer of the micro-coded BIST.
//
// InstAddr selects the microword to fetch. On each clock with inst_ena high
// the pointer moves according to the position flags of the word being
// executed (fo_n/io_n/lo_n, active low) and the address generator's `over`
// (the current test address is the last one of its order):
//   first op (fo_n=0)        : remember this InstAddr as the element start, +1
//   in-between op (io_n=0)   : +1
//   last op (lo_n=0)         : over ? +1 (next element) : back to element start
//   single op (all flags 1)  : over ? +1 : stay
// So every operation of a March element is applied to one address before the
// next address, and the element repeats until the whole address range is
// covered. The flag encoding is the source design's; how the pointer finds
// the element start (a register loaded on the first operation) is this
// design's choice. Asynchronous active-low reset to InstAddr 0.
module inst_ptr #(
  parameter int unsigned IA_W = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            inst_ena,
  input  logic            over,
  input  logic            fo_n,
  input  logic            io_n,
  input  logic            lo_n,
  output logic [IA_W-1:0] inst_addr
);

  logic [IA_W-1:0] elem_start;
  logic [IA_W-1:0] next_addr;

  always_comb begin
    next_addr = inst_addr + 1'b1;
    if (!fo_n || !io_n) begin
      next_addr = inst_addr + 1'b1;
    end else if (!lo_n) begin
      next_addr = over ? inst_addr + 1'b1 : elem_start;
    end else begin
      next_addr = over ? inst_addr + 1'b1 : inst_addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inst_addr  <= '0;
      elem_start <= '0;
    end else if (inst_ena) begin
      inst_addr <= next_addr;
      if (!fo_n) elem_start <= inst_addr;
    end
  end

endmodule
