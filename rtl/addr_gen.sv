// addr_gen: test address generator of the BIST.
//
// A counter of ADDR_W bits. addr_ld loads the first address of the current
// order (0 when inc=1, the top address when inc=0); addr_ena steps it up or
// down by one. `over` is high while the address is the last one of its order
// (top when increasing, 0 when decreasing), which tells the instruction
// pointer that a March element has covered every address. Counting up/down on
// AddrEna follows the source design; the load input and `over` are this
// design's way of delimiting elements. Asynchronous active-low reset to 0.
module addr_gen #(
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              addr_ena,
  input  logic              addr_ld,
  input  logic              inc,
  output logic [ADDR_W-1:0] addr,
  output logic              over
);

  assign over = inc ? (addr == '1) : (addr == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        addr <= '0;
    else if (addr_ld)  addr <= inc ? '0 : '1;
    else if (addr_ena) addr <= inc ? addr + 1'b1 : addr - 1'b1;
  end

endmodule
