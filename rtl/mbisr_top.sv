// mbisr_top: micro-coded memory built-in self test and self repair (MBISR)
// around a 16 x 1 SRAM.
//
// Test & repair mode (ModeType = 1, SMCEna = 1): the state machine controller
// (smc) fetches microwords from the instruction storage through the
// instruction pointer and register; each word is one memory operation whose
// address, data and read/write come from the address generator, data
// generator and read/write control. The input multiplexer routes them to the
// SRAM. Fault diagnosis compares every read with the expected word and pulses
// Fault with the failing address, which programs the redundant logic array
// (when SRDEna = 1). TestDone rises at the end-of-test word; Overflow reports
// more faulty words than redundant words.
// Normal mode (ModeType = 2): AddrIn/DataIn/REna/WEna access the SRAM; an
// address stored in the redundant array is also written to and read from its
// redundant word, and the output multiplexer puts the redundant data on
// MuxOut. Reads return data one clock after REna.
//
// PROGRAM is the March test in the instruction storage (default: the
// 14-operation test); another March algorithm runs by overriding it.
// Timing: five clocks per memory operation, so the default 14-operation test
// of 16 words takes 5*14*16 = 1120 clocks plus 4 clocks of start and end.
// FiType/FiPol inject a fault, per word, into the SRAM model (tie FiType to 0
// for a fault-free memory). Rbc* bring out the memory-side signals of the input multiplexer,
// where the source design places a reliability block whose function it does
// not give; here the multiplexer drives the SRAM directly.
// The block structure and top-level pin names follow the source design; the
// mode codes, idle mode, fault-injection and Rbc* ports are this design's own.
module mbisr_top
  import mbist_pkg::*;
#(
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned DATA_W = 1,
  parameter int unsigned N_RED  = 4,
  parameter prog_t       PROGRAM = MARCH_14,
  localparam int unsigned CNT_W = $clog2(N_RED + 1)
) (
  input  logic                 Clk,
  input  logic                 Rst,        // active low
  input  logic [1:0]           ModeType,
  input  logic                 SMCEna,
  input  logic                 SRDEna,
  input  logic [ADDR_W-1:0]    AddrIn,
  input  logic [DATA_W-1:0]    DataIn,
  input  logic                 REna,
  input  logic                 WEna,
  output logic [DATA_W-1:0]    MuxOut,
  // fault injection into the SRAM model
  input  logic [2**ADDR_W-1:0][2:0] FiType,  // per word, mbist_pkg::fault_t
  input  logic [2**ADDR_W-1:0]      FiPol,   // per word, sensitising value
  // status
  output logic                 TestDone,
  output logic                 Fault,
  output logic [ADDR_W-1:0]    FaultAddr,
  output logic                 Faulty,
  output logic                 Overflow,
  output logic [CNT_W-1:0]     RepairCount,
  // memory-side signals of the input multiplexer
  output logic [ADDR_W-1:0]    RbcAddr,
  output logic [DATA_W-1:0]    RbcData,
  output logic                 RbcRd,
  output logic                 RbcWr,
  output logic                 RbcMemEna
);

  localparam int unsigned IA_W = 4;

  mode_t mode;
  logic  test_mode, normal_mode;
  assign mode        = mode_t'(ModeType);
  assign test_mode   = (mode == MODE_TEST);
  assign normal_mode = (mode == MODE_NORMAL);

  // controller enables
  logic inst_ena, i_ena, ir_ena, addr_ena, addr_ld, data_ena, rw_ena;
  logic mem_ena, fd_ena, rla_ena;

  logic [IA_W-1:0]   inst_addr;
  logic [6:0]        inst;
  mcode_t            op;
  logic [ADDR_W-1:0] t_addr;
  logic              over;
  logic [DATA_W-1:0] t_data;
  logic              t_rd, t_wr;

  logic [DATA_W-1:0] mem_out;
  logic [DATA_W-1:0] fault_data;
  logic              rla_hit;
  fault_t [2**ADDR_W-1:0] fi_type;

  always_comb
    for (int unsigned i = 0; i < 2**ADDR_W; i++) fi_type[i] = fault_t'(FiType[i]);
  logic [DATA_W-1:0] rla_data;

  smc u_smc (
    .clk(Clk), .rst_n(Rst), .smc_ena(SMCEna), .test_mode(test_mode), .srd_ena(SRDEna),
    .op(op), .over(over),
    .inst_ena(inst_ena), .i_ena(i_ena), .ir_ena(ir_ena), .addr_ena(addr_ena), .addr_ld(addr_ld),
    .data_ena(data_ena), .rw_ena(rw_ena), .mem_ena(mem_ena), .fd_ena(fd_ena), .rla_ena(rla_ena),
    .done(TestDone)
  );

  inst_ptr #(.IA_W(IA_W)) u_inst_ptr (
    .clk(Clk), .rst_n(Rst), .inst_ena(inst_ena), .over(over),
    .fo_n(op.fo_n), .io_n(op.io_n), .lo_n(op.lo_n), .inst_addr(inst_addr)
  );

  inst_storage #(.IA_W(IA_W), .PROGRAM(PROGRAM)) u_inst_storage (
    .clk(Clk), .rst_n(Rst), .i_ena(i_ena), .inst_addr(inst_addr), .inst(inst)
  );

  inst_reg u_inst_reg (
    .clk(Clk), .rst_n(Rst), .ir_ena(ir_ena), .inst(inst), .op(op)
  );

  addr_gen #(.ADDR_W(ADDR_W)) u_addr_gen (
    .clk(Clk), .rst_n(Rst), .addr_ena(addr_ena), .addr_ld(addr_ld), .inc(op.inc),
    .addr(t_addr), .over(over)
  );

  data_gen #(.DATA_W(DATA_W)) u_data_gen (
    .clk(Clk), .rst_n(Rst), .data_ena(data_ena), .dbit(op.data), .data(t_data)
  );

  rw_control u_rw_control (
    .clk(Clk), .rst_n(Rst), .rw_ena(rw_ena), .rw(op.rd), .rd_ena(t_rd), .wr_ena(t_wr)
  );

  ip_mux #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_ip_mux (
    .mode(mode),
    .t_addr(t_addr), .t_data(t_data), .t_rd(t_rd), .t_wr(t_wr), .t_mem_ena(mem_ena),
    .n_addr(AddrIn), .n_data(DataIn), .n_rd(REna), .n_wr(WEna),
    .m_addr(RbcAddr), .m_data(RbcData), .m_rd(RbcRd), .m_wr(RbcWr), .m_mem_ena(RbcMemEna)
  );

  sram #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_sram (
    .clk(Clk), .rst_n(Rst), .mem_ena(RbcMemEna), .rd_ena(RbcRd), .wr_ena(RbcWr),
    .addr(RbcAddr), .din(RbcData), .dout(mem_out),
    .fi_type(fi_type), .fi_pol(FiPol)
  );

  fault_diag #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_fault_diag (
    .clk(Clk), .rst_n(Rst), .fd_ena(fd_ena), .mem_out(mem_out), .exp_data(t_data),
    .addr(t_addr), .fault(Fault), .fault_addr(FaultAddr), .fault_data(fault_data),
    .faulty(Faulty)
  );

  rl_array #(.ADDR_W(ADDR_W), .DATA_W(DATA_W), .N_RED(N_RED)) u_rl_array (
    .clk(Clk), .rst_n(Rst), .ena(rla_ena), .test_mode(test_mode), .normal_mode(normal_mode),
    .fault(Fault), .fault_addr(FaultAddr), .fault_data(fault_data),
    .n_addr(AddrIn), .n_data(DataIn), .n_rd(REna), .n_wr(WEna),
    .hit(rla_hit), .rd_data(rla_data), .overflow(Overflow), .used(RepairCount)
  );

  output_mux #(.DATA_W(DATA_W)) u_output_mux (
    .hit(rla_hit), .rla_data(rla_data), .mem_out(mem_out), .dout(MuxOut)
  );

endmodule
