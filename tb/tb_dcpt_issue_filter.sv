// tb_dcpt_issue_filter: self-checking test of the candidate filter and the
// prefetch request register.
//
// Every cycle the candidate, the cache / MSHR / in-flight answers, the
// in-flight-full flag and the memory side's ready are random. A model
// decides the expected outcome in the fixed order cache, MSHR, in-flight,
// full, then "stall" when the request register is occupied and not being
// accepted; it also tracks the request register. The pop, allocate and
// last-prefetch strobes, the outcome code and the request valid/address are
// compared each cycle. Each outcome must occur at least once.
module tb_dcpt_issue_filter;
  import dcpt_pkg::*;

  localparam int unsigned AW = DCPT_ADDR_W;

  logic clk = 0, rst_n = 0;
  logic cand_valid, cand_pop, probe_in_cache, probe_in_mshr;
  logic pfq_hit, pfq_full, pfq_alloc, pf_req_valid, pf_req_ready, last_pf_we;
  logic [AW-1:0] cand_addr, probe_addr, pf_req_addr, last_pf_addr;
  pf_outcome_e outcome;

  int checks = 0, failures = 0;
  int seen[pf_outcome_e];

  dcpt_issue_filter dut (.clk, .rst_n, .cand_valid, .cand_addr, .cand_pop,
    .probe_addr, .probe_in_cache, .probe_in_mshr, .pfq_hit, .pfq_full,
    .pfq_alloc, .pf_req_valid, .pf_req_addr, .pf_req_ready, .last_pf_we,
    .last_pf_addr, .outcome);

  always #5 clk = ~clk;

  bit            m_req = 0;
  logic [AW-1:0] m_addr = '0;

  initial begin
    cand_valid = 0; cand_addr = '0; probe_in_cache = 0; probe_in_mshr = 0;
    pfq_hit = 0; pfq_full = 0; pf_req_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int n = 0; n < 6000; n++) begin
      pf_outcome_e exp_o;
      cand_valid     = ($urandom_range(4) != 0);
      cand_addr      = AW'($urandom);
      probe_in_cache = ($urandom_range(5) == 0);
      probe_in_mshr  = ($urandom_range(5) == 0);
      pfq_hit        = ($urandom_range(5) == 0);
      pfq_full       = ($urandom_range(7) == 0);
      pf_req_ready   = ($urandom_range(2) == 0);
      #1;
      if (!cand_valid)           exp_o = PF_NONE;
      else if (probe_in_cache)   exp_o = PF_IN_CACHE;
      else if (probe_in_mshr)    exp_o = PF_IN_MSHR;
      else if (pfq_hit)          exp_o = PF_IN_FLIGHT;
      else if (pfq_full)         exp_o = PF_QUEUE_FULL;
      else if (m_req && !pf_req_ready) exp_o = PF_STALL;
      else                       exp_o = PF_ISSUED;
      seen[exp_o]++;
      checks++;
      if (outcome !== exp_o || cand_pop !== (cand_valid && exp_o != PF_STALL) ||
          pfq_alloc !== (exp_o == PF_ISSUED) || last_pf_we !== (exp_o == PF_ISSUED) ||
          (exp_o == PF_ISSUED && last_pf_addr !== cand_addr) ||
          probe_addr !== cand_addr ||
          pf_req_valid !== m_req || (m_req && pf_req_addr !== m_addr)) begin
        failures++;
        $display("FAIL n=%0d outcome %s/%s req %b/%b", n, outcome.name(), exp_o.name(),
                 pf_req_valid, m_req);
      end
      @(posedge clk);
      if (exp_o == PF_ISSUED) begin m_req = 1; m_addr = cand_addr; end
      else if (pf_req_ready) m_req = 0;
      #1;
    end
    for (int o = 0; o <= int'(PF_STALL); o++) begin
      checks++;
      if (!seen.exists(pf_outcome_e'(o))) begin
        failures++;
        $display("FAIL outcome %0d never seen", o);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
