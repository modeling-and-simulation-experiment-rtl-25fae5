// smc: state machine controller of the micro-coded BIST.
//
// Drives the enables of the other BIST blocks so that each microword is
// executed as one memory operation in five clocks:
//   FETCH  i_ena    the instruction storage registers the word at InstAddr
//   DECODE ir_ena   the instruction register loads it
//   SETUP           invalid word -> DONE; otherwise data_ena and rw_ena load
//                   the test word and RdEna/WrEna; addr_ld sets the first
//                   address when a new March element starts
//   ACCESS mem_ena  the memory reads or writes
//   CHECK  fd_ena   (reads only) fault diagnosis compares; inst_ena moves
//                   the pointer; after the last operation of an element at
//                   one address, addr_ena steps the address unless `over`,
//                   in which case the element is finished.
// The controller starts from IDLE when smc_ena is high in test mode, falls
// back to IDLE if either goes away, and stays in DONE (done = 1) after the
// end-of-test word until smc_ena is released. rla_ena follows srd_ena.
// The signal names are the source design's; the state sequence and timing
// are this design's own. Asynchronous active-low reset.
module smc
  import mbist_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   smc_ena,
  input  logic   test_mode,
  input  logic   srd_ena,
  input  mcode_t op,
  input  logic   over,
  output logic   inst_ena,
  output logic   i_ena,
  output logic   ir_ena,
  output logic   addr_ena,
  output logic   addr_ld,
  output logic   data_ena,
  output logic   rw_ena,
  output logic   mem_ena,
  output logic   fd_ena,
  output logic   rla_ena,
  output logic   done
);

  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_DECODE, S_SETUP, S_ACCESS, S_CHECK, S_DONE
  } state_t;

  state_t state, state_nx;
  logic   new_elem, new_elem_nx;
  logic   elem_last;  // the operation is the last of its element at this address

  assign elem_last = !op.lo_n || (op.fo_n && op.io_n && op.lo_n);

  always_comb begin
    state_nx    = state;
    new_elem_nx = new_elem;
    inst_ena    = 1'b0;
    i_ena       = 1'b0;
    ir_ena      = 1'b0;
    addr_ena    = 1'b0;
    addr_ld     = 1'b0;
    data_ena    = 1'b0;
    rw_ena      = 1'b0;
    mem_ena     = 1'b0;
    fd_ena      = 1'b0;
    done        = 1'b0;
    rla_ena     = srd_ena;
    if (!(smc_ena && test_mode) && state != S_DONE) begin
      state_nx = S_IDLE;
    end else begin
      unique case (state)
        S_IDLE:   state_nx = S_FETCH;
        S_FETCH: begin
          i_ena    = 1'b1;
          state_nx = S_DECODE;
        end
        S_DECODE: begin
          ir_ena   = 1'b1;
          state_nx = S_SETUP;
        end
        S_SETUP: begin
          if (!op.valid) begin
            state_nx = S_DONE;
          end else begin
            data_ena    = 1'b1;
            rw_ena      = 1'b1;
            addr_ld     = new_elem;
            new_elem_nx = 1'b0;
            state_nx    = S_ACCESS;
          end
        end
        S_ACCESS: begin
          mem_ena  = 1'b1;
          state_nx = S_CHECK;
        end
        S_CHECK: begin
          fd_ena   = op.rd;
          inst_ena = 1'b1;
          if (elem_last) begin
            if (over) new_elem_nx = 1'b1;
            else      addr_ena    = 1'b1;
          end
          state_nx = S_FETCH;
        end
        S_DONE: begin
          done = 1'b1;
          if (!smc_ena) state_nx = S_IDLE;
        end
        default: state_nx = S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      new_elem <= 1'b1;
    end else begin
      state    <= state_nx;
      new_elem <= new_elem_nx;
    end
  end

endmodule
