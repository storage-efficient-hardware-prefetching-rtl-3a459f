// dcpt_candidate_gen: turns a delta correlation into prefetch candidates.
//
// After a match at time-ordered position match_pos, the deltas that follow
// the matched pair (chrono[match_pos+2] up to the newest delta) are replayed
// on top of the entry's last address: the first candidate is last address
// plus the first of them, each further candidate is the previous candidate
// plus the next delta. Each candidate is pushed into the candidate buffer. If
// a candidate equals the entry's last prefetch, everything produced up to and
// including it is discarded (the buffer is cleared), since those lines were
// already requested by an earlier prediction.
//
// This is the single-adder design point: one delta is handled per cycle.
// To give every prediction the same latency, the generator steps over all
// time-ordered positions 2..N_DELTAS-1 whether or not they follow the match,
// so if "start" is high in cycle 0, "done" is high in cycle N_DELTAS-2.
// Inputs are sampled at start; busy is high
// from the cycle after start until the cycle of done, inclusive.
module dcpt_candidate_gen
  import dcpt_pkg::*;
#(
  parameter int unsigned ADDR_W   = DCPT_ADDR_W,
  parameter int unsigned N_DELTAS = DCPT_N_DELTAS,
  parameter int unsigned DELTA_W  = DCPT_DELTA_W,
  localparam int unsigned PTR_W   = (N_DELTAS > 1) ? $clog2(N_DELTAS) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               start,
  input  logic [N_DELTAS-1:0][DELTA_W-1:0]   chrono,
  input  logic                               match,
  input  logic [PTR_W-1:0]                   match_pos,
  input  logic [ADDR_W-1:0]                  last_addr,
  input  logic [ADDR_W-1:0]                  last_pf,
  output logic                               busy,
  output logic                               done,
  output logic                               cand_push,
  output logic [ADDR_W-1:0]                  cand_addr,
  output logic                               cand_clear
);

  logic [N_DELTAS-1:0][DELTA_W-1:0] deltas_q;
  logic                             match_q;
  logic [PTR_W-1:0]                 first_q;   // first position replayed
  logic [ADDR_W-1:0]                sum_q;     // last address or last candidate
  logic [ADDR_W-1:0]                last_pf_q;
  logic [PTR_W-1:0]                 pos_q;     // position handled this cycle
  logic                             run_q;

  logic              use_delta;
  logic [ADDR_W-1:0] next_sum;

  assign use_delta = run_q && match_q && (pos_q >= first_q);
  assign next_sum  = sum_q + ADDR_W'($signed(deltas_q[pos_q]));

  assign busy       = run_q;
  assign done       = run_q && (pos_q == PTR_W'(N_DELTAS - 1));
  assign cand_addr  = next_sum;
  assign cand_clear = use_delta && (next_sum == last_pf_q);
  assign cand_push  = use_delta && !cand_clear;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q     <= 1'b0;
      pos_q     <= '0;
      match_q   <= 1'b0;
      first_q   <= '0;
      sum_q     <= '0;
      last_pf_q <= '0;
      deltas_q  <= '0;
    end else if (start) begin
      run_q     <= 1'b1;
      pos_q     <= PTR_W'(2);
      match_q   <= match;
      first_q   <= match_pos + PTR_W'(2);
      sum_q     <= last_addr;
      last_pf_q <= last_pf;
      deltas_q  <= chrono;
    end else if (run_q) begin
      if (use_delta) sum_q <= next_sum;
      if (done) run_q <= 1'b0;
      else      pos_q <= pos_q + 1'b1;
    end
  end

endmodule
