// mbist_pkg: types and constants shared by the micro-coded memory BIST and
// self-repair (BISR) blocks.
//
// The 7-bit microcode word (one memory operation per word) is, MSB first:
//   Valid | Fo | Io | Lo | I/D | R/W | Data
// Valid=0 marks the end of the test. Fo, Io and Lo are active-low position
// flags inside a March element: 111 a single-operation element, 011 the first,
// 101 an in-between and 110 the last operation of a multi-operation element.
// I/D=1 walks the addresses upward, 0 downward. R/W=1 reads (and compares),
// 0 writes. Data is the test pattern: all ones or all zeros.
//
// MARCH_14 is the default program: the 14-operation March test
//   { up(w0); up(w0,r0,r0); up(w1,r1,r1); down(w1,r1,r1); down(w0,r0,r0); down(r0) }
// followed by end-of-test words. The word layout and the program follow the
// source design; the mode and fault-injection encodings are this design's own.
package mbist_pkg;

  typedef struct packed {
    logic valid;  // 1 = valid instruction, 0 = end of test
    logic fo_n;   // 0 = first operation of a multi-operation element
    logic io_n;   // 0 = in-between operation
    logic lo_n;   // 0 = last operation
    logic inc;    // 1 = increasing address order
    logic rd;     // 1 = read and compare, 0 = write
    logic data;   // test pattern bit
  } mcode_t;

  // ModeType pin encoding: 1 = test & repair, 2 = normal, others idle.
  typedef enum logic [1:0] {
    MODE_IDLE0  = 2'd0,
    MODE_TEST   = 2'd1,
    MODE_NORMAL = 2'd2,
    MODE_IDLE3  = 2'd3
  } mode_t;

  // Fault primitives the SRAM model can carry (fault injection).
  typedef enum logic [2:0] {
    FLT_NONE     = 3'd0,
    FLT_WDF      = 3'd1,  // write disturb: a non-transition write flips the cell
    FLT_DRDF     = 3'd2,  // deceptive read destructive: read correct, cell flips
    FLT_DYN_RDF  = 3'd3,  // dRDF: write then read flips the cell, read wrong
    FLT_DYN_DRDF = 3'd4,  // dDRDF: write then read flips the cell, read correct
    FLT_DYN_IRF  = 3'd5   // dIRF: write then read returns wrong, cell kept
  } fault_t;

  localparam int unsigned PROG_DEPTH = 16;
  typedef logic [6:0] prog_t [PROG_DEPTH];

  localparam prog_t MARCH_14 = '{
    7'h7C,                 // M0  up   w0            (single)
    7'h5C, 7'h6E, 7'h76,   // M1  up   w0, r0, r0
    7'h5D, 7'h6F, 7'h77,   // M2  up   w1, r1, r1
    7'h59, 7'h6B, 7'h73,   // M3  down w1, r1, r1
    7'h58, 7'h6A, 7'h72,   // M4  down w0, r0, r0
    7'h7A,                 // M5  down r0            (single)
    7'h00, 7'h00           // end of test
  };

endpackage
