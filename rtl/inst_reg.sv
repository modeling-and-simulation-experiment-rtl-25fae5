// inst_reg: instruction register of the BIST.
//
// A 7-bit register loaded from the instruction storage when ir_ena is high;
// its output is the decoded microword (mbist_pkg::mcode_t) whose fields drive
// the pointer (Fo/Io/Lo), address generator (I/D), read/write control (R/W)
// and data generator (Data). The width, enable and reset to zero follow the
// source design; the reset is asynchronous, active low.
module inst_reg
  import mbist_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ir_ena,
  input  logic [6:0] inst,
  output mcode_t     op
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      op <= '0;
    else if (ir_ena) op <= mcode_t'(inst);
  end

endmodule
