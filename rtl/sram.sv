// sram: the memory under test, a 2**ADDR_W x DATA_W word array, with fault
// injection for the single-cell faults the March test is meant to find.
//
// Write: mem_ena & wr_ena & !rd_ena stores din at addr on the clock edge.
// Read:  mem_ena & rd_ena & !wr_ena registers the word onto dout at the clock
//        edge (one clock read latency); dout holds otherwise.
// The array has no reset, like a real SRAM.
//
// Fault injection: word a carries the fault fi_type[a] (mbist_pkg::fault_t,
// FLT_NONE for a good word), so different words can carry different faults in
// one run. A fault is sensitised only when the cell holds the value fi_pol[a]
// (all bits) at the sensitising operation, so the notation
// <S/F/R> (sensitising sequence / faulty cell value / read result) maps as
//   WDF   write of the value already held (non-transition) flips the cell
//   DRDF  a read returns the right value and flips the cell
//   dRDF  <vwvrv/~v/~v>: a read right after a write of that word flips the
//         cell and returns the flipped value
//   dDRDF <vwvrv/~v/v>: as dRDF, but the read returns the right value
//   dIRF  <vwvrv/v/~v>: the read returns the wrong value, the cell is kept
// "Right after" means the previous memory operation was a write to the same
// word. The fault list and their behaviour follow the source design; the
// per-word type/polarity interface is this design's own. A fault acts on the whole
// word. rst_n only clears the write-tracking flag used by the dynamic faults.
// With every fi_type = FLT_NONE the model is a plain synchronous SRAM.
module sram
  import mbist_pkg::*;
#(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 mem_ena,
  input  logic                 rd_ena,
  input  logic                 wr_ena,
  input  logic [ADDR_W-1:0]    addr,
  input  logic [DATA_W-1:0]    din,
  output logic [DATA_W-1:0]    dout,
  input  fault_t [2**ADDR_W-1:0] fi_type,
  input  logic   [2**ADDR_W-1:0] fi_pol
);

  localparam int unsigned DEPTH = 2**ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];
  logic              last_wr;       // previous operation was a write ...
  logic [ADDR_W-1:0] last_wr_addr;  // ... to this word

  logic              do_wr, do_rd;
  logic [DATA_W-1:0] cur, pol_word, wr_val, rd_val;
  logic              flip_on_rd, sens, imm;
  fault_t            ft;

  assign do_wr    = mem_ena && wr_ena && !rd_ena;
  assign do_rd    = mem_ena && rd_ena && !wr_ena;
  assign cur      = mem[addr];
  assign ft       = fi_type[addr];
  assign pol_word = {DATA_W{fi_pol[addr]}};
  assign sens     = (ft != FLT_NONE) && (cur == pol_word);
  assign imm      = last_wr && (last_wr_addr == addr);

  // value stored by a write
  always_comb begin
    wr_val = din;
    if (ft == FLT_WDF && sens && din == cur) wr_val = ~din;
  end

  // value returned by a read, and whether the read flips the cell
  always_comb begin
    rd_val     = cur;
    flip_on_rd = 1'b0;
    if (sens) begin
      unique case (ft)
        FLT_DRDF:     flip_on_rd = 1'b1;
        FLT_DYN_RDF:  if (imm) begin rd_val = ~cur; flip_on_rd = 1'b1; end
        FLT_DYN_DRDF: if (imm) flip_on_rd = 1'b1;
        FLT_DYN_IRF:  if (imm) rd_val = ~cur;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[addr] <= wr_val;
    else if (do_rd && flip_on_rd) mem[addr] <= ~cur;
    if (do_rd) dout <= rd_val;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_wr      <= 1'b0;
      last_wr_addr <= '0;
    end else if (do_wr || do_rd) begin
      last_wr      <= do_wr;
      last_wr_addr <= addr;
    end
  end

endmodule
