// inst_storage: instruction storage (microcode ROM) of the BIST.
//
// Holds the March test program, one 7-bit microword per memory operation
// (layout in mbist_pkg). On a clock with i_ena high the word at inst_addr is
// registered onto `inst`, so the word is available one clock after the fetch.
// The default program is the 14-operation March test of the source design
// followed by end-of-test words (Valid=0); another March algorithm is loaded
// by overriding PROGRAM. Locations beyond the program read as 7'h00 (end of
// test). The output register resets to 0 (asynchronous, active low).
module inst_storage
  import mbist_pkg::*;
#(
  parameter int unsigned IA_W    = 4,
  parameter prog_t       PROGRAM = MARCH_14
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            i_ena,
  input  logic [IA_W-1:0] inst_addr,
  output logic [6:0]      inst
);

  logic [6:0] word;

  always_comb begin
    word = 7'h00;
    if (32'(inst_addr) < PROG_DEPTH) word = PROGRAM[inst_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     inst <= '0;
    else if (i_ena) inst <= word;
  end

endmodule
