// dcpt_issue_filter: checks each prefetch candidate and issues the survivors.
//
// Candidates are taken from the head of the candidate buffer one per cycle
// and checked in the DCPT order: a line already in the cache is dropped; a
// line for which a demand miss is already outstanding in the MSHRs is
// dropped; a line already in the in-flight prefetch buffer is dropped; if
// that buffer is full the prefetch is dropped. Otherwise the candidate is
// issued: it is entered into the in-flight buffer and becomes the entry's new
// last prefetch.
//
// The cache and MSHR checks are probes of the host's structures: probe_addr
// goes out and probe_in_cache / probe_in_mshr must answer in the same cycle
// (this design's assumption). An issued prefetch is held in a one-entry
// output register and offered to memory with a valid/ready handshake:
// pf_req_valid stays high with a stable pf_req_addr until pf_req_ready. While
// that register is occupied and not being emptied, the head candidate waits
// (outcome PF_STALL). A candidate is decided in the cycle it is popped.
module dcpt_issue_filter
  import dcpt_pkg::*;
#(
  parameter int unsigned ADDR_W = DCPT_ADDR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  // head of the candidate buffer
  input  logic              cand_valid,
  input  logic [ADDR_W-1:0] cand_addr,
  output logic              cand_pop,
  // probes of the cache and MSHRs
  output logic [ADDR_W-1:0] probe_addr,
  input  logic              probe_in_cache,
  input  logic              probe_in_mshr,
  // in-flight prefetch buffer
  input  logic              pfq_hit,
  input  logic              pfq_full,
  output logic              pfq_alloc,
  // prefetch request to memory
  output logic              pf_req_valid,
  output logic [ADDR_W-1:0] pf_req_addr,
  input  logic              pf_req_ready,
  // last prefetch update of the table entry being served
  output logic              last_pf_we,
  output logic [ADDR_W-1:0] last_pf_addr,
  // what happened to the head candidate this cycle
  output pf_outcome_e       outcome
);

  logic              req_q;
  logic [ADDR_W-1:0] req_addr_q;
  logic              slot_free;

  assign slot_free    = !req_q || pf_req_ready;
  assign probe_addr   = cand_addr;
  assign pf_req_valid = req_q;
  assign pf_req_addr  = req_addr_q;

  always_comb begin
    outcome = PF_NONE;
    if (cand_valid) begin
      if (probe_in_cache)     outcome = PF_IN_CACHE;
      else if (probe_in_mshr) outcome = PF_IN_MSHR;
      else if (pfq_hit)       outcome = PF_IN_FLIGHT;
      else if (pfq_full)      outcome = PF_QUEUE_FULL;
      else if (!slot_free)    outcome = PF_STALL;
      else                    outcome = PF_ISSUED;
    end
  end

  assign cand_pop     = cand_valid && (outcome != PF_STALL);
  assign pfq_alloc    = (outcome == PF_ISSUED);
  assign last_pf_we   = (outcome == PF_ISSUED);
  assign last_pf_addr = cand_addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_q      <= 1'b0;
      req_addr_q <= '0;
    end else if (outcome == PF_ISSUED) begin
      req_q      <= 1'b1;
      req_addr_q <= cand_addr;
    end else if (pf_req_ready) begin
      req_q      <= 1'b0;
    end
  end

  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (pf_req_valid && !pf_req_ready) |=> (pf_req_valid && $stable(pf_req_addr)));

endmodule
