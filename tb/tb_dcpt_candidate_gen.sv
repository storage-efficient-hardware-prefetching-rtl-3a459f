// tb_dcpt_candidate_gen: self-checking test of candidate generation.
//
// Each run pulses "start" with a random time-ordered delta history, match
// flag, match position, last address and last prefetch (often set equal to
// one of the candidates so the discard path is taken). The pushes and
// clears the generator produces are replayed onto a list, which must equal
// the list a model builds by adding the deltas after the match one by one
// and dropping everything up to a candidate equal to the last prefetch.
// The first run is the worked example: last address 30 and deltas 1, 9
// after the match give the candidates 31 and 40. "done" must come exactly
// N_DELTAS-2 cycles after start, every time.
module tb_dcpt_candidate_gen;
  import dcpt_pkg::*;

  localparam int unsigned AW = DCPT_ADDR_W;
  localparam int unsigned ND = DCPT_N_DELTAS;
  localparam int unsigned DW = DCPT_DELTA_W;
  localparam int unsigned PW = $clog2(ND);

  logic clk = 0, rst_n = 0;
  logic start, match, busy, done, cand_push, cand_clear;
  logic [ND-1:0][DW-1:0] chrono;
  logic [PW-1:0] match_pos;
  logic [AW-1:0] last_addr, last_pf, cand_addr;

  int checks = 0, failures = 0, discards = 0;

  dcpt_candidate_gen dut (.clk, .rst_n, .start, .chrono, .match, .match_pos,
                          .last_addr, .last_pf, .busy, .done, .cand_push,
                          .cand_addr, .cand_clear);

  always #5 clk = ~clk;

  task automatic run(input logic [ND-1:0][DW-1:0] c, input bit m, input int pos,
                     input logic [AW-1:0] la, input logic [AW-1:0] lp);
    logic [AW-1:0] exp_q[$], got_q[$];
    logic [AW-1:0] s;
    int cyc;
    // model
    s = la;
    if (m)
      for (int p = pos + 2; p < int'(ND); p++) begin
        s = s + AW'($signed(c[p]));
        if (s == lp) exp_q.delete();
        else exp_q.push_back(s);
      end
    // drive
    chrono = c; match = m; match_pos = PW'(pos); last_addr = la; last_pf = lp;
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cyc = 0;
    forever begin
      cyc++;
      if (cand_push) got_q.push_back(cand_addr);
      if (cand_clear) begin got_q.delete(); discards++; end
      if (done) break;
      if (cyc > 3 * ND) break;
      @(posedge clk); #1;
    end
    checks++;
    if (cyc != int'(ND) - 2) begin
      failures++;
      $display("FAIL latency %0d cycles, expected %0d", cyc, ND - 2);
    end
    checks++;
    if (got_q != exp_q) begin
      failures++;
      $display("FAIL candidates: got %p expected %p", got_q, exp_q);
    end
    @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    logic [ND-1:0][DW-1:0] c;
    start = 0; chrono = '0; match = 0; match_pos = '0; last_addr = '0; last_pf = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // worked example: ... 1 9 1 9 newest last, match at ND-4, last address 30
    c = '0;
    c[ND-4] = DW'(1); c[ND-3] = DW'(9); c[ND-2] = DW'(1); c[ND-1] = DW'(9);
    run(c, 1, ND - 4, AW'(30), AW'(0));
    // same, with last prefetch 31: only 40 survives
    run(c, 1, ND - 4, AW'(30), AW'(31));
    for (int n = 0; n < 800; n++) begin
      automatic int pos = $urandom_range(ND - 3);
      automatic logic [AW-1:0] la = AW'($urandom);
      automatic logic [AW-1:0] lp = AW'($urandom);
      automatic logic [AW-1:0] s = la;
      for (int i = 0; i < ND; i++) c[i] = DW'(int'($urandom_range(8)) - 4);
      if (n % 9 == 0) for (int i = 0; i < ND; i++) c[i] = DW'($urandom);
      if (n % 2 == 0) begin
        // make the last prefetch one of the candidates
        automatic int k = $urandom_range(ND - 1 - (pos + 2));
        for (int p = pos + 2; p <= pos + 2 + k; p++) s = s + AW'($signed(c[p]));
        lp = s;
      end
      run(c, ($urandom_range(5) != 0), pos, la, lp);
    end
    checks++;
    if (discards == 0) begin failures++; $display("FAIL discard never exercised"); end
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
