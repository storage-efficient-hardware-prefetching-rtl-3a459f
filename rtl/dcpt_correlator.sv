// dcpt_correlator: delta correlation over one entry's delta history.
//
// The circular delta buffer is first unrolled into time order: chrono[0] is
// the oldest delta (the one at the delta pointer) and chrono[N_DELTAS-1] the
// newest. The two newest deltas form the pair that is searched for. Every
// earlier position i (0 <= i <= N_DELTAS-3) has its own pair of comparators,
// so the whole search takes one cycle, the fully parallel design point of
// DCPT. When several positions match, the oldest one (smallest i) is chosen:
// this yields the longest run of deltas after the match and therefore the
// largest prefetch distance, as in the worked example where the pattern is
// found at the very beginning of the history. match_pos is that i; the deltas
// to replay start at chrono[match_pos+2].
//
// Purely combinational.
module dcpt_correlator
  import dcpt_pkg::*;
#(
  parameter int unsigned N_DELTAS = DCPT_N_DELTAS,
  parameter int unsigned DELTA_W  = DCPT_DELTA_W,
  localparam int unsigned PTR_W   = (N_DELTAS > 1) ? $clog2(N_DELTAS) : 1
) (
  input  logic [N_DELTAS-1:0][DELTA_W-1:0]   deltas,   // physical order
  input  logic [PTR_W-1:0]                   ptr,      // head = oldest
  output logic [N_DELTAS-1:0][DELTA_W-1:0]   chrono,   // time order, [0] oldest
  output logic                               match,
  output logic [PTR_W-1:0]                   match_pos
);

  always_comb begin
    for (int unsigned i = 0; i < N_DELTAS; i++) begin
      int unsigned j;
      j = int'(ptr) + i;
      if (j >= N_DELTAS) j = j - N_DELTAS;
      chrono[i] = deltas[j];
    end
  end

  // Scan from the newest candidate position towards the oldest; the last
  // hit seen, the oldest, wins.
  always_comb begin
    match     = 1'b0;
    match_pos = '0;
    for (int i = int'(N_DELTAS) - 3; i >= 0; i--) begin
      if (chrono[i] == chrono[N_DELTAS-2] && chrono[i+1] == chrono[N_DELTAS-1]) begin
        match     = 1'b1;
        match_pos = PTR_W'(i);
      end
    end
  end

endmodule
