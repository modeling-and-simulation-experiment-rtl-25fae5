// data_gen: test data generator of the BIST.
//
// On a clock with data_ena high it registers the test word: DATA_W copies of
// the microword's Data bit (all ones or all zeros). This word is written in a
// write operation and is the expected value in a read operation. Follows the
// source design; the reset (asynchronous, active low, to 0) is its own too.
module data_gen #(
  parameter int unsigned DATA_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              data_ena,
  input  logic              dbit,
  output logic [DATA_W-1:0] data
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        data <= '0;
    else if (data_ena) data <= {DATA_W{dbit}};
  end

endmodule
