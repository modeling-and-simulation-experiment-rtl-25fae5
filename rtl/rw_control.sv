// rw_control: read/write control of the BIST.
//
// On a clock with rw_ena high it registers RdEna = R/W bit and WrEna = its
// complement, so exactly one of them is set for the operation that follows.
// Both reset to 0 (asynchronous, active low), as in the source design. The
// memory acts only while the controller also raises MemEna.
module rw_control (
  input  logic clk,
  input  logic rst_n,
  input  logic rw_ena,
  input  logic rw,
  output logic rd_ena,
  output logic wr_ena
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ena <= 1'b0;
      wr_ena <= 1'b0;
    end else if (rw_ena) begin
      rd_ena <= rw;
      wr_ena <= !rw;
    end
  end

endmodule
