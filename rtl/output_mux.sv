// output_mux: output multiplexer of the repair logic.
//
// Passes the redundant word's data when the last read addressed a repaired
// (faulty) word, otherwise the memory's read data. Combinational, as in the
// source design.
module output_mux #(
  parameter int unsigned DATA_W = 1
) (
  input  logic              hit,
  input  logic [DATA_W-1:0] rla_data,
  input  logic [DATA_W-1:0] mem_out,
  output logic [DATA_W-1:0] dout
);

  assign dout = hit ? rla_data : mem_out;

endmodule
