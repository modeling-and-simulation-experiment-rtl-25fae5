// tb_mbisr_top: end-to-end, self-checking testbench for mbisr_top at its
// default size (16 x 1 SRAM, 4 redundant words, default March program).
//
// Each scenario resets the design, fills the SRAM with a random pattern in
// normal mode, injects faults (one or two fault types on chosen words), runs the built-in test to TestDone and
// then uses the memory in normal mode. The testbench keeps its own model: the
// March test written as a list of elements, and a model of the injected fault
// primitives. From it, it predicts and checks
//   - every memory operation the BIST issues (order, address, read/write, data),
//   - the test length: 5 clocks per operation plus 4, i.e. 1124 clocks,
//   - every fault pulse and its address,
//   - the number of redundant words used and Overflow,
//   - that every injected faulty word is found (write disturb at 0 aside),
//   - that after repair every normal-mode read returns the last value written
//     (the redundant word replaces the faulty one), and that with repair
//     disabled a faulty word does return wrong data.
// It counts how often each mechanism occurred (fault pulse, redundant word
// programmed, repeated fault on a stored word, overflow, redundant read and
// write, increasing and decreasing address order, element loop-back, end of
// test, repair disabled, idle mode) and counts a failure for any that never
// occurred.
module tb_mbisr_top;
  import mbist_pkg::*;

  localparam int NW = 16;

  logic        Clk = 1'b0, Rst = 1'b0;
  logic [1:0]  ModeType = 2'd2;
  logic        SMCEna = 1'b0, SRDEna = 1'b1;
  logic [3:0]  AddrIn = '0;
  logic        DataIn = 1'b0, REna = 1'b0, WEna = 1'b0;
  logic        MuxOut;
  logic [15:0][2:0] FiType = '0;
  logic [15:0]      FiPol = '0;
  logic        TestDone, Fault, Faulty, Overflow;
  logic [3:0]  FaultAddr;
  logic [2:0]  RepairCount;
  logic [3:0]  RbcAddr;
  logic        RbcData, RbcRd, RbcWr, RbcMemEna;

  mbisr_top dut (.*);

  always #5 Clk = ~Clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- March test, as a list of elements ----------------
  // element e: up[e] (1 = increasing), nops[e] operations, ops[e][j] = {read, data}
  bit     el_up   [6] = '{1, 1, 1, 0, 0, 0};
  int     el_nops [6] = '{1, 3, 3, 3, 3, 1};
  bit [1:0] el_ops [6][3] = '{'{2'b00, 2'b00, 2'b00},   // w0
                              '{2'b00, 2'b10, 2'b10},   // w0 r0 r0
                              '{2'b01, 2'b11, 2'b11},   // w1 r1 r1
                              '{2'b01, 2'b11, 2'b11},   // w1 r1 r1
                              '{2'b00, 2'b10, 2'b10},   // w0 r0 r0
                              '{2'b10, 2'b00, 2'b00}};  // r0

  // ---------------- fault model of the memory ----------------
  bit   mm [NW];
  bit   m_last_w;
  int   m_last_a;
  fault_t m_type [NW];   // per word, FLT_NONE = good
  bit     m_pol  [NW];

  function automatic void m_write(int a, bit v);
    if (m_type[a] == FLT_WDF && mm[a] == v && v == m_pol[a]) mm[a] = !v;
    else mm[a] = v;
    m_last_w = 1; m_last_a = a;
  endfunction

  function automatic bit m_read(int a);
    bit r = mm[a];
    bit s = mm[a] == m_pol[a];
    bit imm = m_last_w && m_last_a == a;
    case (m_type[a])
      FLT_DRDF:     if (s) mm[a] = !mm[a];
      FLT_DYN_RDF:  if (s && imm) begin mm[a] = !mm[a]; r = mm[a]; end
      FLT_DYN_DRDF: if (s && imm) mm[a] = !mm[a];
      FLT_DYN_IRF:  if (s && imm) r = !r;
      default: ;
    endcase
    m_last_w = 0;
    return r;
  endfunction

  // ---------------- expected BIST operations ----------------
  typedef struct { int a; bit rd; bit d; bit first; bit elem_start; } mop_t;
  mop_t exp_ops [$];
  int   exp_faults [$];

  function automatic void build_expected();
    exp_ops.delete();
    exp_faults.delete();
    for (int e = 0; e < 6; e++)
      for (int k = 0; k < NW; k++) begin
        int a = el_up[e] ? k : NW - 1 - k;
        for (int j = 0; j < el_nops[e]; j++) begin
          bit rd = el_ops[e][j][1];
          bit d  = el_ops[e][j][0];
          exp_ops.push_back('{a, rd, d, j == 0, j == 0 && k == 0});
          if (rd) begin
            if (m_read(a) != d) exp_faults.push_back(a);
          end else begin
            m_write(a, d);
          end
        end
      end
  endfunction

  // ---------------- monitors ----------------
  mop_t got_ops [$];
  int   got_faults [$];
  bit   monitor_on = 0;
  always @(posedge Clk) if (monitor_on) begin
    if (RbcMemEna) got_ops.push_back('{int'(RbcAddr), RbcRd, RbcData, 0, 0});
    if (Fault) got_faults.push_back(int'(FaultAddr));
  end

  // mechanism counters
  int n_fault = 0, n_prog = 0, n_refresh = 0, n_overflow = 0, n_red_rd = 0, n_red_wr = 0;
  int n_up = 0, n_down = 0, n_loop = 0, n_done = 0, n_norepair = 0, n_idle = 0;

  // ---------------- normal-mode access ----------------
  bit shadow [NW];   // last value written in normal mode

  task automatic nwrite(int a, bit v);
    @(negedge Clk);
    ModeType = 2'd2; AddrIn = 4'(a); DataIn = v; WEna = 1; REna = 0;
    @(negedge Clk);
    WEna = 0;
    m_write(a, v);
    shadow[a] = v;
  endtask

  task automatic nread(int a, output bit v);
    @(negedge Clk);
    ModeType = 2'd2; AddrIn = 4'(a); REna = 1; WEna = 0;
    @(negedge Clk);
    REna = 0;
    v = MuxOut;
    void'(m_read(a));
  endtask

  // ---------------- one scenario ----------------
  // two groups of faulty words: group A (fa, mask_a, pol_a) and group B
  task automatic scenario(string name, fault_t fa, bit [15:0] mask_a, bit pol_a,
                          fault_t fb, bit [15:0] mask_b, bit pol_b, bit repair);
    bit [15:0] mask;
    int cycles, distinct;
    int seen [int];
    bit v;
    int wrong = 0;
    $display("scenario %s", name);
    // reset, then a random memory pattern in normal mode, fault-free
    @(negedge Clk);
    Rst = 0; SMCEna = 0; SRDEna = repair; FiType = '0; FiPol = '0;
    foreach (m_type[a]) begin m_type[a] = FLT_NONE; m_pol[a] = 0; end
    m_last_w = 0;
    mask = (fa != FLT_NONE ? mask_a : 16'h0) | (fb != FLT_NONE ? mask_b : 16'h0);
    @(negedge Clk);
    Rst = 1;
    for (int a = 0; a < NW; a++) nwrite(a, 1'($urandom));
    // inject and predict
    for (int a = 0; a < NW; a++) begin
      if (mask_a[a]) begin FiType[a] = 3'(fa); FiPol[a] = pol_a; m_type[a] = fa; m_pol[a] = pol_a; end
      if (mask_b[a]) begin FiType[a] = 3'(fb); FiPol[a] = pol_b; m_type[a] = fb; m_pol[a] = pol_b; end
    end
    build_expected();
    // run the test
    got_ops.delete(); got_faults.delete();
    @(negedge Clk);
    ModeType = 2'd1; SMCEna = 1; monitor_on = 1;
    cycles = 0;
    do begin @(posedge Clk); cycles++; #1; end while (!TestDone && cycles < 5000);
    repeat (3) @(posedge Clk);
    monitor_on = 0;
    check(TestDone, {name, ": TestDone"});
    if (TestDone) n_done++;
    check(cycles == 5 * exp_ops.size() + 4,
          $sformatf("%s: test length %0d clocks, expected %0d", name, cycles, 5 * exp_ops.size() + 4));
    // operations
    check(got_ops.size() == exp_ops.size(),
          $sformatf("%s: %0d memory operations, expected %0d", name, got_ops.size(), exp_ops.size()));
    for (int i = 0; i < exp_ops.size() && i < got_ops.size(); i++) begin
      bit ok = got_ops[i].a == exp_ops[i].a && got_ops[i].rd == exp_ops[i].rd &&
               (exp_ops[i].rd || got_ops[i].d == exp_ops[i].d);
      check(ok, $sformatf("%s: op %0d addr %0d rd %0d d %0d, expected %0d %0d %0d", name, i,
                          got_ops[i].a, got_ops[i].rd, got_ops[i].d, exp_ops[i].a, exp_ops[i].rd, exp_ops[i].d));
      if (i > 0 && got_ops[i].a == got_ops[i-1].a + 1) n_up++;
      if (i > 0 && got_ops[i].a == got_ops[i-1].a - 1) n_down++;
      if (i > 0 && got_ops[i].a != got_ops[i-1].a && exp_ops[i].first && !exp_ops[i].elem_start) n_loop++;
    end
    // faults
    check(got_faults.size() == exp_faults.size(),
          $sformatf("%s: %0d fault pulses, expected %0d", name, got_faults.size(), exp_faults.size()));
    for (int i = 0; i < exp_faults.size() && i < got_faults.size(); i++)
      check(got_faults[i] == exp_faults[i],
            $sformatf("%s: fault %0d at %0d, expected %0d", name, i, got_faults[i], exp_faults[i]));
    foreach (exp_faults[i]) begin
      if (seen.exists(exp_faults[i])) n_refresh++;
      seen[exp_faults[i]] = 1;
    end
    distinct = seen.num();
    n_fault += got_faults.size();
    // coverage of the default program: every faulty word is found, except a
    // write-disturb-at-0 word (it can escape, depending on its start value)
    if (!((fa == FLT_WDF && pol_a == 0) || (fb == FLT_WDF && pol_b == 0)))
      check(distinct == $countones(mask),
            $sformatf("%s: %0d faulty words found, %0d injected", name, distinct, $countones(mask)));
    check(Faulty == (exp_faults.size() > 0), {name, ": Faulty flag"});
    if (repair) begin
      check(int'(RepairCount) == (distinct > 4 ? 4 : distinct),
            $sformatf("%s: %0d redundant words used, expected %0d", name, RepairCount, distinct > 4 ? 4 : distinct));
      check(Overflow == (distinct > 4), {name, ": Overflow"});
      n_prog += RepairCount;
      if (Overflow) n_overflow++;
    end else begin
      check(RepairCount == 0 && !Overflow, {name, ": no repair while SRDEna is low"});
    end
    // normal mode after the test
    @(negedge Clk);
    SMCEna = 0;
    for (int a = 0; a < NW; a++) nwrite(a, 1'($urandom));
    // a write of the sensitising value followed by a read of each faulty word
    for (int a = 0; a < NW; a++) if (mask[a]) begin
      bit repaired = repair && seen.exists(a) && (distinct <= 4);
      nwrite(a, m_pol[a]);
      nread(a, v);
      if (repaired) check(v == shadow[a], $sformatf("%s: read-after-write of %0d", name, a));
      else if (v != shadow[a]) wrong++;
    end
    for (int k = 0; k < 200; k++) begin
      int a = $urandom_range(0, NW - 1);
      bit repaired = repair && seen.exists(a) && (distinct <= 4);
      if ($urandom_range(0, 2) == 0) begin
        nwrite(a, 1'($urandom));
        if (repaired) n_red_wr++;
      end else begin
        nread(a, v);
        if (repaired) n_red_rd++;
        if (!mask[a] || repaired)
          check(v == shadow[a], $sformatf("%s: normal read of %0d gave %0d, expected %0d", name, a, v, shadow[a]));
        else if (v != shadow[a]) wrong++;
      end
    end
    if (!repair && wrong > 0) n_norepair++;
    // idle mode: no memory access
    @(negedge Clk);
    ModeType = 2'd0; REna = 1; WEna = 1; AddrIn = 0;
    #1;
    check(!RbcMemEna, {name, ": idle mode disables the memory"});
    if (!RbcMemEna) n_idle++;
    @(negedge Clk);
    REna = 0; WEna = 0; ModeType = 2'd2;
  endtask

  initial begin
    repeat (3) @(posedge Clk);
    scenario("fault-free",      FLT_NONE,     16'h0000, 0, FLT_NONE,     16'h0000, 0, 1);
    scenario("WDF value 1",     FLT_WDF,      16'h0201, 1, FLT_NONE,     16'h0000, 0, 1);
    scenario("WDF value 0",     FLT_WDF,      16'h0040, 0, FLT_NONE,     16'h0000, 0, 1);
    scenario("DRDF value 0",    FLT_DRDF,     16'h8004, 0, FLT_NONE,     16'h0000, 0, 1);
    scenario("DRDF value 1",    FLT_DRDF,     16'h0100, 1, FLT_NONE,     16'h0000, 0, 1);
    scenario("dRDF value 0",    FLT_DYN_RDF,  16'h0030, 0, FLT_NONE,     16'h0000, 0, 1);
    scenario("dDRDF value 1",   FLT_DYN_DRDF, 16'h4008, 1, FLT_NONE,     16'h0000, 0, 1);
    scenario("dIRF value 0",    FLT_DYN_IRF,  16'h1002, 0, FLT_NONE,     16'h0000, 0, 1);
    scenario("dIRF value 1",    FLT_DYN_IRF,  16'h0800, 1, FLT_NONE,     16'h0000, 0, 1);
    scenario("WDF + dIRF",      FLT_WDF,      16'h0400, 1, FLT_DYN_IRF,  16'h0008, 0, 1);
    scenario("DRDF + dRDF",     FLT_DRDF,     16'h0002, 1, FLT_DYN_RDF,  16'h2000, 1, 1);
    scenario("overflow",        FLT_DRDF,     16'h5a5a, 0, FLT_NONE,     16'h0000, 0, 1);
    scenario("repair disabled", FLT_DYN_IRF,  16'h0081, 0, FLT_NONE,     16'h0000, 0, 0);
    $display("mechanisms: fault=%0d programmed=%0d refresh=%0d overflow=%0d red_read=%0d red_write=%0d up=%0d down=%0d loop=%0d done=%0d norepair=%0d idle=%0d",
             n_fault, n_prog, n_refresh, n_overflow, n_red_rd, n_red_wr, n_up, n_down, n_loop, n_done, n_norepair, n_idle);
    check(n_fault > 0,    "mechanism: fault pulse");
    check(n_prog > 0,     "mechanism: redundant word programmed");
    check(n_refresh > 0,  "mechanism: repeated fault on a stored word");
    check(n_overflow > 0, "mechanism: overflow");
    check(n_red_rd > 0,   "mechanism: redundant read");
    check(n_red_wr > 0,   "mechanism: redundant write");
    check(n_up > 0,       "mechanism: increasing order");
    check(n_down > 0,     "mechanism: decreasing order");
    check(n_loop > 0,     "mechanism: element loop-back");
    check(n_done > 0,     "mechanism: end of test");
    check(n_norepair > 0, "mechanism: repair disabled");
    check(n_idle > 0,     "mechanism: idle mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
