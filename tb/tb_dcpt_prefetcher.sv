// tb_dcpt_prefetcher: end-to-end test of the DCPT prefetcher at its default
// size (98 entries, 19 deltas of 12 bits, 32 prefetches in flight).
//
// A miss stream is generated from a mix of load behaviours: constant
// strides, repeating delta patterns such as +1,+9 (the worked example),
// pointer-chasing-like random addresses, huge jumps that overflow a 12-bit
// delta, repeated misses to the same line, and a stream of many one-off PCs
// that forces table evictions. The host side is modelled here: the cache
// holds a fixed pseudo-random set of lines, the MSHRs hold the last four
// demand-miss lines, memory accepts prefetch requests with random
// back-pressure, and outstanding prefetches are completed in bursts between
// misses, with long pauses so that the in-flight buffer fills up. Misses are
// otherwise offered back to back, so most of them wait on trig_ready.
//
// A reference model of the DCPT algorithm written independently here runs
// on the same stream. Every candidate decision of the design (address and
// outcome: issued, in cache, in MSHR, in flight, dropped because the buffer
// is full), every prefetch request accepted by memory and the number of
// cycles each miss occupies the prefetcher (N_DELTAS + 1 + decisions (at
// least one) + stall cycles for a table hit, 1 for a new PC) are compared
// with the model. Each mechanism must occur at least once.
module tb_dcpt_prefetcher;
  import dcpt_pkg::*;

  localparam int unsigned E   = DCPT_TABLE_ENTRIES;
  localparam int unsigned ND  = DCPT_N_DELTAS;
  localparam int unsigned DW  = DCPT_DELTA_W;
  localparam int unsigned QN  = DCPT_PFQ_ENTRIES;
  localparam int unsigned PCW = DCPT_PC_W;
  localparam int unsigned AW  = DCPT_ADDR_W;
  localparam int          NUM_MISSES = 4000;
  localparam longint      DMAX = (longint'(1) << (DW - 1)) - 1;  // largest storable delta

  logic clk = 0, rst_n = 0;
  logic trig_valid, trig_ready, probe_valid, probe_in_cache, probe_in_mshr;
  logic pf_req_valid, pf_req_ready, pf_done_valid, busy;
  logic [PCW-1:0] trig_pc;
  logic [AW-1:0] trig_addr, probe_addr, pf_req_addr, pf_done_addr;
  logic stat_train, stat_table_hit, stat_evict, stat_delta_zero, stat_overflow;
  logic stat_corr, stat_match, stat_discard;
  logic [2:0] stat_outcome;
  logic [$clog2(QN+1)-1:0] stat_pfq_count;

  dcpt_prefetcher dut (
    .clk, .rst_n, .trig_valid, .trig_ready, .trig_pc, .trig_addr,
    .probe_valid, .probe_addr, .probe_in_cache, .probe_in_mshr,
    .pf_req_valid, .pf_req_addr, .pf_req_ready, .pf_done_valid, .pf_done_addr,
    .busy, .stat_train, .stat_table_hit, .stat_evict, .stat_delta_zero,
    .stat_overflow, .stat_corr, .stat_match, .stat_discard, .stat_outcome,
    .stat_pfq_count
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- host
  logic [AW-1:0] mshr_q[$];        // last four demand-miss lines

  function automatic bit cache_has(input logic [AW-1:0] a);
    logic [31:0] h = (32'(a) * 32'h9E37_79B1) >> 9;
    return (h % 13) == 0;
  endfunction

  function automatic bit mshr_has(input logic [AW-1:0] a);
    foreach (mshr_q[i]) if (mshr_q[i] == a) return 1;
    return 0;
  endfunction

  always_comb begin
    probe_in_cache = cache_has(probe_addr);
    probe_in_mshr  = mshr_has(probe_addr);
  end

  // --------------------------------------------------------------- model
  bit                 m_valid [E];
  logic [PCW-1:0]     m_pc    [E];
  logic [AW-1:0]      m_la    [E];
  logic [AW-1:0]      m_lp    [E];
  int                 m_d     [E][ND];
  int                 m_ptr   [E];
  int                 m_repl = 0;
  logic [AW-1:0]      m_pfq[$];     // prefetches in flight

  typedef struct packed { logic [2:0] outcome; logic [AW-1:0] addr; } decision_t;
  decision_t exp_dec[$], got_dec[$];
  logic [AW-1:0] exp_req[$];        // issued prefetches, in order

  // counts of each mechanism seen in the model
  int n_alloc, n_hit, n_evict, n_zero, n_ovf, n_match, n_nomatch, n_discard;
  int n_out[8];
  int n_stall_cycles, n_backpressure, n_completed, n_trig_wait;

  function automatic bit m_in_pfq(input logic [AW-1:0] a);
    foreach (m_pfq[i]) if (m_pfq[i] == a) return 1;
    return 0;
  endfunction

  // Returns 1 when the PC was in the table.
  function automatic bit model_miss(input logic [PCW-1:0] pc, input logic [AW-1:0] addr);
    int idx = -1;
    int c[ND];
    int mpos = -1;
    logic [AW-1:0] s;
    logic [AW-1:0] cand[$];
    longint d;
    for (int i = 0; i < int'(E); i++) if (m_valid[i] && m_pc[i] == pc) idx = i;
    if (idx < 0) begin
      n_alloc++;
      if (m_valid[m_repl]) n_evict++;
      m_valid[m_repl] = 1; m_pc[m_repl] = pc; m_la[m_repl] = addr; m_lp[m_repl] = '0;
      for (int k = 0; k < int'(ND); k++) m_d[m_repl][k] = 0;
      m_ptr[m_repl] = 0;
      m_repl = (m_repl + 1) % E;
      return 0;
    end
    n_hit++;
    d = longint'($signed(addr - m_la[idx]));
    if (d == 0) n_zero++;
    else begin
      if (d > DMAX || d < -DMAX - 1) begin n_ovf++; d = 0; end
      m_d[idx][m_ptr[idx]] = int'(d);
      m_ptr[idx] = (m_ptr[idx] + 1) % ND;
    end
    m_la[idx] = addr;
    for (int k = 0; k < int'(ND); k++) c[k] = m_d[idx][(m_ptr[idx] + k) % ND];
    for (int i = 0; i <= int'(ND) - 3; i++)
      if (mpos < 0 && c[i] == c[ND-2] && c[i+1] == c[ND-1]) mpos = i;
    if (mpos < 0) begin n_nomatch++; return 1; end
    n_match++;
    s = addr;
    for (int p = mpos + 2; p < int'(ND); p++) begin
      s = s + AW'(c[p]);
      if (s == m_lp[idx]) begin cand.delete(); n_discard++; end
      else cand.push_back(s);
    end
    foreach (cand[k]) begin
      pf_outcome_e o;
      if (cache_has(cand[k]))            o = PF_IN_CACHE;
      else if (mshr_has(cand[k]))        o = PF_IN_MSHR;
      else if (m_in_pfq(cand[k]))        o = PF_IN_FLIGHT;
      else if (m_pfq.size() == QN)       o = PF_QUEUE_FULL;
      else begin
        o = PF_ISSUED;
        m_pfq.push_back(cand[k]);
        exp_req.push_back(cand[k]);
        m_lp[idx] = cand[k];
      end
      n_out[o]++;
      exp_dec.push_back('{outcome: o, addr: cand[k]});
    end
    return 1;
  endfunction

  // ------------------------------------------------------ DUT observation
  logic [AW-1:0] accepted[$];       // requests taken by memory, in order
  logic [AW-1:0] outstanding[$];    // accepted, not yet completed
  int cur_dec, cur_stall;
  int dut_evict, dut_zero, dut_ovf, dut_match, dut_discard, dut_hit;

  always @(posedge clk) if (rst_n) begin
    if (stat_outcome != 3'(PF_NONE) && stat_outcome != 3'(PF_STALL)) begin
      got_dec.push_back('{outcome: stat_outcome, addr: probe_addr});
      cur_dec++;
    end
    if (stat_outcome == 3'(PF_STALL)) begin cur_stall++; n_stall_cycles++; end
    if (pf_req_valid && pf_req_ready) begin
      accepted.push_back(pf_req_addr);
      outstanding.push_back(pf_req_addr);
    end
    if (pf_req_valid && !pf_req_ready) n_backpressure++;
    if (stat_evict)      dut_evict++;
    if (stat_table_hit)  dut_hit++;
    if (stat_delta_zero) dut_zero++;
    if (stat_overflow)   dut_ovf++;
    if (stat_match)      dut_match++;
    if (stat_discard)    dut_discard++;
  end

  // memory acceptance: random back-pressure
  always @(negedge clk) pf_req_ready = ($urandom_range(2) == 0);

  // --------------------------------------------------------- the stream
  typedef enum int {K_STRIDE, K_PATTERN, K_RANDOM, K_JUMP, K_SAME} kind_e;
  localparam int NLOADS = 24;
  kind_e          l_kind  [NLOADS];
  logic [AW-1:0]  l_addr  [NLOADS];
  int             l_pat   [NLOADS][4];
  int             l_plen  [NLOADS];
  int             l_step  [NLOADS];

  function automatic logic [AW-1:0] next_addr(input int l);
    case (l_kind[l])
      K_STRIDE, K_PATTERN: begin
        l_addr[l] = l_addr[l] + AW'(l_pat[l][l_step[l] % l_plen[l]]);
        l_step[l]++;
      end
      K_RANDOM: l_addr[l] = AW'($urandom_range(1 << 20));
      K_JUMP:   l_addr[l] = l_addr[l] + AW'(2 * DMAX + 2 + $urandom_range(100));
      default:  if ($urandom_range(3) == 0) l_addr[l] = l_addr[l] + 1;
    endcase
    return l_addr[l];
  endfunction

  // Busy time of the miss accepted last, checked when the next one is
  // accepted (or at the end): the next miss is offered at once, so it waits
  // on trig_ready while the prefetcher is busy.
  int pend_hit = -1;   // last miss: 1 table hit, 0 new PC, -1 already checked
  int pend_ndec;       // decisions the model made for it
  int cur_busy;        // busy cycles since it was accepted
  always @(posedge clk) if (rst_n && busy) cur_busy++;

  task automatic check_prev();
    int exp_cyc;
    if (pend_hit < 0) return;
    exp_cyc = (pend_hit == 1) ? int'(ND) + 1 + ((pend_ndec > 0) ? pend_ndec : 1) + cur_stall : 1;
    checks++;
    if (cur_busy != exp_cyc) begin
      failures++;
      $display("FAIL miss busy %0d cycles, expected %0d", cur_busy, exp_cyc);
    end
    pend_hit = -1;
  endtask

  task automatic one_miss(input logic [PCW-1:0] pc, input logic [AW-1:0] addr);
    int dec_before;
    trig_pc = pc; trig_addr = addr; trig_valid = 1;
    forever begin
      @(negedge clk);
      if (trig_ready) break;
      n_trig_wait++;
    end
    @(posedge clk); #1;          // accepted at this edge
    trig_valid = 0;
    check_prev();
    cur_busy = 0; cur_dec = 0; cur_stall = 0;
    // the demand miss itself goes into the MSHRs
    mshr_q.push_back(addr);
    if (mshr_q.size() > 4) void'(mshr_q.pop_front());
    dec_before = exp_dec.size();
    pend_hit  = int'(model_miss(pc, addr));
    pend_ndec = exp_dec.size() - dec_before;
  endtask

  // wait until the prefetcher is idle and check the last miss
  task automatic drain();
    while (busy) @(posedge clk);
    #1;
    check_prev();
  endtask

  // complete up to n outstanding prefetches, one per cycle, prefetcher idle
  task automatic complete(input int n);
    drain();
    for (int k = 0; k < n && outstanding.size() > 0; k++) begin
      int j = $urandom_range(outstanding.size() - 1);
      logic [AW-1:0] a = outstanding[j];
      outstanding.delete(j);
      for (int i = m_pfq.size() - 1; i >= 0; i--) if (m_pfq[i] == a) m_pfq.delete(i);
      pf_done_valid = 1; pf_done_addr = a;
      @(posedge clk); #1;
      pf_done_valid = 0;
      n_completed++;
    end
  endtask

  initial begin
    trig_valid = 0; trig_pc = '0; trig_addr = '0; pf_done_valid = 0; pf_done_addr = '0;
    foreach (m_valid[i]) m_valid[i] = 0;
    for (int l = 0; l < NLOADS; l++) begin
      l_addr[l] = AW'($urandom_range(1 << 24));
      l_step[l] = 0;
      l_kind[l] = kind_e'(l % 5);
      case (l_kind[l])
        K_STRIDE: begin
          l_plen[l] = 1;
          l_pat[l][0] = (l % 3 == 0) ? 1 : (l % 3 == 1) ? 3 : -2;
        end
        K_PATTERN: begin
          l_plen[l] = 2 + (l % 3);
          l_pat[l][0] = 1; l_pat[l][1] = 9; l_pat[l][2] = -4; l_pat[l][3] = 6;
        end
        default: l_plen[l] = 1;
      endcase
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1;
    // the worked example first: misses at 10, 11, 20, 21, 30 prefetch 31, 40
    begin
      int base_dec;
      automatic logic [AW-1:0] seq[] = '{10, 11, 20, 21, 30};
      foreach (seq[i]) begin
        base_dec = exp_dec.size();
        one_miss(PCW'(32'h100), AW'(seq[i]));
      end
      checks++;
      if (exp_dec.size() - base_dec != 2 || exp_dec[base_dec].addr != AW'(31) ||
          exp_dec[base_dec+1].addr != AW'(40)) begin
        failures++;
        $display("FAIL worked example: model made %0d candidates", exp_dec.size() - base_dec);
      end
    end
    for (int n = 0; n < NUM_MISSES; n++) begin
      if (n % 10 == 3) begin
        // a one-off PC: fills the table and evicts old entries
        one_miss(PCW'(32'h0080_0000 + 4 * n), AW'($urandom));
      end else begin
        automatic int l = $urandom_range(NLOADS - 1);
        one_miss(PCW'(32'h0040_0000 + 16 * l), next_addr(l));
      end
      // completions: none during the pauses, so the buffer fills
      if ((n / 300) % 2 == 1) complete($urandom_range(3));
      else if ($urandom_range(7) == 0) complete(1);
    end
    drain();
    repeat (5) @(posedge clk);
    #1;

    // decisions and requests
    checks++;
    if (got_dec.size() != exp_dec.size()) begin
      failures++;
      $display("FAIL %0d decisions, expected %0d", got_dec.size(), exp_dec.size());
    end
    for (int i = 0; i < got_dec.size() && i < exp_dec.size(); i++) begin
      checks++;
      if (got_dec[i] != exp_dec[i]) begin
        failures++;
        if (failures < 20)
          $display("FAIL decision %0d: got %0d @%h expected %0d @%h", i, got_dec[i].outcome,
                   got_dec[i].addr, exp_dec[i].outcome, exp_dec[i].addr);
      end
    end
    checks++;
    if (accepted != exp_req) begin
      failures++;
      $display("FAIL %0d requests accepted, %0d expected, or order differs",
               accepted.size(), exp_req.size());
    end
    checks++;
    if (dut_evict != n_evict || dut_zero != n_zero || dut_ovf != n_ovf ||
        dut_match != n_match || dut_discard != n_discard || dut_hit != n_hit) begin
      failures++;
      $display("FAIL status counts: evict %0d/%0d zero %0d/%0d ovf %0d/%0d match %0d/%0d discard %0d/%0d hit %0d/%0d",
               dut_evict, n_evict, dut_zero, n_zero, dut_ovf, n_ovf, dut_match, n_match,
               dut_discard, n_discard, dut_hit, n_hit);
    end

    $display("misses=%0d new_pc=%0d table_hit=%0d evictions=%0d zero_delta=%0d overflow=%0d",
             NUM_MISSES + 5, n_alloc, n_hit, n_evict, n_zero, n_ovf);
    $display("match=%0d no_match=%0d discard=%0d issued=%0d in_cache=%0d in_mshr=%0d in_flight=%0d queue_full=%0d",
             n_match, n_nomatch, n_discard, n_out[PF_ISSUED], n_out[PF_IN_CACHE],
             n_out[PF_IN_MSHR], n_out[PF_IN_FLIGHT], n_out[PF_QUEUE_FULL]);
    $display("stall_cycles=%0d backpressure_cycles=%0d completed=%0d trig_wait_cycles=%0d",
             n_stall_cycles, n_backpressure, n_completed, n_trig_wait);
    begin
      int mech[string];
      mech["table allocation"] = n_alloc;   mech["table hit"] = n_hit;
      mech["eviction"] = n_evict;           mech["zero delta"] = n_zero;
      mech["delta overflow"] = n_ovf;       mech["pattern match"] = n_match;
      mech["no match"] = n_nomatch;         mech["last-prefetch discard"] = n_discard;
      mech["issued"] = n_out[PF_ISSUED];    mech["in cache"] = n_out[PF_IN_CACHE];
      mech["in MSHR"] = n_out[PF_IN_MSHR];  mech["in flight"] = n_out[PF_IN_FLIGHT];
      mech["buffer full"] = n_out[PF_QUEUE_FULL];
      mech["issue stall"] = n_stall_cycles; mech["completion"] = n_completed;
      mech["miss waits on trig_ready"] = n_trig_wait;
      foreach (mech[k]) begin
        checks++;
        if (mech[k] == 0) begin failures++; $display("FAIL mechanism never seen: %s", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
