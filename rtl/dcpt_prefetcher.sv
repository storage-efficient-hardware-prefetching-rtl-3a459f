// dcpt_prefetcher: Delta Correlating Prediction Table (DCPT) prefetcher.
//
// The prefetcher watches the cache misses of load instructions. For each
// load PC it keeps one table entry with the load's last miss address and the
// history of the deltas between its successive misses. On every miss it
// appends the new delta, looks for an earlier occurrence of the two newest
// deltas in that history and, when it finds one, assumes the deltas that
// followed the earlier occurrence will repeat: it adds them, one after the
// other, to the current miss address and prefetches the resulting lines.
// Candidates up to the one that equals the load's last prefetch are dropped,
// and the rest are filtered against the cache, the MSHRs and the buffer of
// outstanding prefetches before being issued.
//
// One miss is handled at a time (misses at this level are infrequent), by a
// controller that steps through these states:
//   IDLE   trig_ready is high; a miss (trig_valid) is accepted.
//   UPDATE table lookup by PC; on a hit the delta history is updated, on a
//          miss a new entry is allocated (FIFO replacement) and the
//          operation ends there. 1 cycle.
//   CORR   delta pair search over the whole history in parallel; starts the
//          candidate generator. 1 cycle.
//   GEN    single-adder candidate generation, fixed N_DELTAS-3 more cycles.
//   ISSUE  one candidate per cycle through the filter; a candidate waits
//          while the prefetch request register is full and not accepted.
//   WB     the entry's new last prefetch is written back. 1 cycle.
// A miss that hits the table therefore occupies the prefetcher for
// N_DELTAS + 1 + (cycles in ISSUE) cycles after it is accepted, the
// fixed-latency calculation of DCPT; a new PC takes one cycle.
//
// Interfaces (all line addresses, one clock, asynchronous active-low reset):
//   trig_*          miss stream in, valid/ready.
//   probe_*         same-cycle lookup of a candidate in the cache and MSHRs.
//   pf_req_*        prefetch requests out, valid/ready.
//   pf_done_*       completion of a prefetch; frees its in-flight entry.
// The table organisation, the handshakes, the widths and the one-at-a-time
// controller are this design's choices; the entry format, the update,
// correlation, candidate and filtering rules and the default sizes follow
// the DCPT design.
module dcpt_prefetcher
  import dcpt_pkg::*;
#(
  parameter int unsigned TABLE_ENTRIES = DCPT_TABLE_ENTRIES,
  parameter int unsigned N_DELTAS      = DCPT_N_DELTAS,
  parameter int unsigned DELTA_W       = DCPT_DELTA_W,
  parameter int unsigned PFQ_ENTRIES   = DCPT_PFQ_ENTRIES,
  parameter int unsigned PC_W          = DCPT_PC_W,
  parameter int unsigned ADDR_W        = DCPT_ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // miss stream
  input  logic              trig_valid,
  output logic              trig_ready,
  input  logic [PC_W-1:0]   trig_pc,
  input  logic [ADDR_W-1:0] trig_addr,
  // cache / MSHR probe
  output logic              probe_valid,
  output logic [ADDR_W-1:0] probe_addr,
  input  logic              probe_in_cache,
  input  logic              probe_in_mshr,
  // prefetch requests
  output logic              pf_req_valid,
  output logic [ADDR_W-1:0] pf_req_addr,
  input  logic              pf_req_ready,
  // prefetch completions
  input  logic              pf_done_valid,
  input  logic [ADDR_W-1:0] pf_done_addr,
  // status, for performance counters and debug
  output logic              busy,
  output logic              stat_train,      // a miss is being trained (1 cycle)
  output logic              stat_table_hit,  // ... and its PC was in the table
  output logic              stat_evict,      // ... or it evicted another PC
  output logic              stat_delta_zero, // ... with a zero delta
  output logic              stat_overflow,   // ... with a delta too large to store
  output logic              stat_corr,       // a delta pair search is made (1 cycle)
  output logic              stat_match,      // ... and found an earlier pair
  output logic              stat_discard,    // candidates dropped up to last prefetch
  output logic [2:0]        stat_outcome,    // pf_outcome_e of the head candidate
  output logic [$clog2(PFQ_ENTRIES+1)-1:0] stat_pfq_count // prefetches in flight
);

  localparam int unsigned IDX_W  = (TABLE_ENTRIES > 1) ? $clog2(TABLE_ENTRIES) : 1;
  localparam int unsigned PTR_W  = (N_DELTAS > 1) ? $clog2(N_DELTAS) : 1;
  localparam int unsigned CBUF_D = N_DELTAS - 2;
  localparam int unsigned CBUF_W = $clog2(CBUF_D + 1);

  typedef enum logic [2:0] {S_IDLE, S_UPDATE, S_CORR, S_GEN, S_ISSUE, S_WB} state_e;
  state_e state_q;

  // working copy of the entry being served
  logic [PC_W-1:0]                  pc_q;
  logic [ADDR_W-1:0]                addr_q;
  logic [IDX_W-1:0]                 idx_q;
  logic [ADDR_W-1:0]                last_pf_q;
  logic [N_DELTAS-1:0][DELTA_W-1:0] deltas_q;
  logic [PTR_W-1:0]                 ptr_q;

  // table
  logic                             lk_hit;
  logic [IDX_W-1:0]                 lk_idx, lk_victim;
  logic                             lk_victim_valid;
  logic [ADDR_W-1:0]                lk_last_addr, lk_last_pf;
  logic [N_DELTAS-1:0][DELTA_W-1:0] lk_deltas;
  logic [PTR_W-1:0]                 lk_ptr;
  logic                             wr_en, wr_alloc;
  logic [IDX_W-1:0]                 wr_idx;
  logic [ADDR_W-1:0]                wr_last_pf;
  logic [N_DELTAS-1:0][DELTA_W-1:0] wr_deltas;
  logic [PTR_W-1:0]                 wr_ptr;

  // delta update
  logic [N_DELTAS-1:0][DELTA_W-1:0] upd_deltas;
  logic [PTR_W-1:0]                 upd_ptr;
  logic                             upd_zero, upd_overflow;

  // correlation and generation
  logic [N_DELTAS-1:0][DELTA_W-1:0] chrono;
  logic                             match;
  logic [PTR_W-1:0]                 match_pos;
  logic                             gen_start, gen_busy, gen_done;
  logic                             cand_push, cand_clear;
  logic [ADDR_W-1:0]                cand_addr;

  // candidate buffer, issue, in-flight buffer
  logic                             cbuf_empty, cbuf_full, cbuf_pop;
  logic [ADDR_W-1:0]                cbuf_head;
  logic [CBUF_W-1:0]                cbuf_count;
  logic                             cand_valid;
  logic                             pfq_hit, pfq_full, pfq_alloc;
  logic                             last_pf_we;
  logic [ADDR_W-1:0]                last_pf_addr;
  pf_outcome_e                      outcome;

  dcpt_table #(
    .ENTRIES(TABLE_ENTRIES), .PC_W(PC_W), .ADDR_W(ADDR_W),
    .N_DELTAS(N_DELTAS), .DELTA_W(DELTA_W)
  ) u_table (
    .clk, .rst_n,
    .lk_pc(pc_q), .lk_hit, .lk_idx, .lk_victim, .lk_victim_valid, .lk_last_addr, .lk_last_pf,
    .lk_deltas, .lk_ptr,
    .wr_en, .wr_alloc, .wr_idx, .wr_pc(pc_q), .wr_last_addr(addr_q),
    .wr_last_pf, .wr_deltas, .wr_ptr
  );

  dcpt_delta_update #(
    .ADDR_W(ADDR_W), .N_DELTAS(N_DELTAS), .DELTA_W(DELTA_W)
  ) u_update (
    .miss_addr(addr_q), .last_addr(lk_last_addr), .deltas_in(lk_deltas),
    .ptr_in(lk_ptr), .deltas_out(upd_deltas), .ptr_out(upd_ptr),
    .delta_zero(upd_zero), .overflow(upd_overflow)
  );

  dcpt_correlator #(
    .N_DELTAS(N_DELTAS), .DELTA_W(DELTA_W)
  ) u_corr (
    .deltas(deltas_q), .ptr(ptr_q), .chrono, .match, .match_pos
  );

  dcpt_candidate_gen #(
    .ADDR_W(ADDR_W), .N_DELTAS(N_DELTAS), .DELTA_W(DELTA_W)
  ) u_gen (
    .clk, .rst_n, .start(gen_start), .chrono, .match, .match_pos,
    .last_addr(addr_q), .last_pf(last_pf_q),
    .busy(gen_busy), .done(gen_done), .cand_push, .cand_addr, .cand_clear
  );

  dcpt_candidate_buffer #(
    .DEPTH(CBUF_D), .ADDR_W(ADDR_W)
  ) u_cbuf (
    .clk, .rst_n, .clear(cand_clear), .push(cand_push), .push_addr(cand_addr),
    .pop(cbuf_pop), .empty(cbuf_empty), .full(cbuf_full), .head_addr(cbuf_head),
    .count(cbuf_count)
  );

  dcpt_issue_filter #(
    .ADDR_W(ADDR_W)
  ) u_issue (
    .clk, .rst_n,
    .cand_valid, .cand_addr(cbuf_head), .cand_pop(cbuf_pop),
    .probe_addr, .probe_in_cache, .probe_in_mshr,
    .pfq_hit, .pfq_full, .pfq_alloc,
    .pf_req_valid, .pf_req_addr, .pf_req_ready,
    .last_pf_we, .last_pf_addr, .outcome
  );

  dcpt_pf_queue #(
    .ENTRIES(PFQ_ENTRIES), .ADDR_W(ADDR_W)
  ) u_pfq (
    .clk, .rst_n, .lk_addr(cbuf_head), .lk_hit(pfq_hit), .full(pfq_full),
    .count(stat_pfq_count), .alloc(pfq_alloc), .alloc_addr(cbuf_head),
    .done(pf_done_valid), .done_addr(pf_done_addr)
  );

  assign trig_ready  = (state_q == S_IDLE);
  assign busy        = (state_q != S_IDLE);
  assign cand_valid  = (state_q == S_ISSUE) && !cbuf_empty;
  assign probe_valid = cand_valid;
  assign gen_start   = (state_q == S_CORR);

  assign stat_train      = (state_q == S_UPDATE);
  assign stat_table_hit  = stat_train && lk_hit;
  assign stat_evict      = stat_train && !lk_hit && lk_victim_valid;
  assign stat_delta_zero = stat_table_hit && upd_zero;
  assign stat_overflow   = stat_table_hit && upd_overflow;
  assign stat_corr       = (state_q == S_CORR);
  assign stat_match      = stat_corr && match;
  assign stat_discard    = cand_clear;
  assign stat_outcome    = outcome;

  // Table writes: the trained entry in UPDATE, the new last prefetch in WB.
  always_comb begin
    wr_en      = 1'b0;
    wr_alloc   = 1'b0;
    wr_idx     = idx_q;
    wr_last_pf = last_pf_q;
    wr_deltas  = deltas_q;
    wr_ptr     = ptr_q;
    if (state_q == S_UPDATE) begin
      wr_en = 1'b1;
      if (lk_hit) begin
        wr_idx     = lk_idx;
        wr_last_pf = lk_last_pf;
        wr_deltas  = upd_deltas;
        wr_ptr     = upd_ptr;
      end else begin
        // new entry: deltas 0, pointer at the first delta
        wr_alloc   = 1'b1;
        wr_idx     = lk_victim;
        wr_last_pf = '0;
        wr_deltas  = '0;
        wr_ptr     = '0;
      end
    end else if (state_q == S_WB) begin
      wr_en = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= S_IDLE;
      pc_q      <= '0;
      addr_q    <= '0;
      idx_q     <= '0;
      last_pf_q <= '0;
      deltas_q  <= '0;
      ptr_q     <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (trig_valid) begin
          pc_q    <= trig_pc;
          addr_q  <= trig_addr;
          state_q <= S_UPDATE;
        end
        S_UPDATE: begin
          idx_q     <= wr_idx;
          last_pf_q <= wr_last_pf;
          deltas_q  <= wr_deltas;
          ptr_q     <= wr_ptr;
          state_q   <= lk_hit ? S_CORR : S_IDLE;
        end
        S_CORR:  state_q <= S_GEN;
        S_GEN:   if (gen_done) state_q <= S_ISSUE;
        S_ISSUE: begin
          if (last_pf_we) last_pf_q <= last_pf_addr;
          if (cbuf_empty || (cbuf_count == CBUF_W'(1) && cbuf_pop)) state_q <= S_WB;
        end
        S_WB:    state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  a_cbuf_room: assert property (@(posedge clk) disable iff (!rst_n)
    cand_push |-> !cbuf_full);

  a_gen_only_in_gen: assert property (@(posedge clk) disable iff (!rst_n)
    gen_busy |-> (state_q == S_GEN));

endmodule
