// dcpt_pf_queue: the buffer of prefetches issued but not yet completed.
//
// Holds up to ENTRIES (32) line addresses. The issue stage uses it twice: a
// candidate that is already outstanding is not sent again, and when all
// entries are in use a new candidate is dropped. An entry is allocated when
// a prefetch is handed to the memory side and freed when the memory side
// reports that prefetch complete. The capacity and the two uses follow the
// DCPT issue rules; the allocate/complete handshake is this design's choice.
//
// Interface and timing:
//   lk_addr -> lk_hit, full, count: combinational.
//   alloc/alloc_addr: takes the lowest free entry at the clock edge (ignored
//     when full).
//   done/done_addr: frees every valid entry holding done_addr at the clock
//     edge. An allocation and a completion may happen in the same cycle.
module dcpt_pf_queue
  import dcpt_pkg::*;
#(
  parameter int unsigned ENTRIES = DCPT_PFQ_ENTRIES,
  parameter int unsigned ADDR_W  = DCPT_ADDR_W,
  localparam int unsigned CNT_W  = $clog2(ENTRIES + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] lk_addr,
  output logic              lk_hit,
  output logic              full,
  output logic [CNT_W-1:0]  count,
  input  logic              alloc,
  input  logic [ADDR_W-1:0] alloc_addr,
  input  logic              done,
  input  logic [ADDR_W-1:0] done_addr
);

  logic [ADDR_W-1:0]  addr_q [ENTRIES];
  logic [ENTRIES-1:0] valid_q;
  logic [ENTRIES-1:0] free_sel;   // one-hot lowest free entry

  always_comb begin
    lk_hit = 1'b0;
    count  = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid_q[i] && addr_q[i] == lk_addr) lk_hit = 1'b1;
      count = count + CNT_W'(valid_q[i]);
    end
  end

  assign full     = &valid_q;
  assign free_sel = ~valid_q & (valid_q + 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else begin
      for (int unsigned i = 0; i < ENTRIES; i++) begin
        if (done && valid_q[i] && addr_q[i] == done_addr) valid_q[i] <= 1'b0;
        if (alloc && free_sel[i]) valid_q[i] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int unsigned i = 0; i < ENTRIES; i++)
      if (alloc && free_sel[i]) addr_q[i] <= alloc_addr;
  end

endmodule
