// dcpt_candidate_buffer: the temporary buffer of prefetch candidates.
//
// A small FIFO. The candidate generator pushes candidates in the order they
// are computed; "clear" empties the buffer, which is how the generator
// discards every candidate up to one that equals the entry's last prefetch.
// The issue stage pops from the head. DEPTH defaults to N_DELTAS-2, the most
// candidates one correlation can produce. Push, pop and clear act at the
// clock edge; clear wins over a push in the same cycle. A push into a full
// buffer or a pop from an empty one is ignored (and flagged by assertions).
// The temporary candidate buffer and its discard follow the DCPT scheme; the
// FIFO order, the depth and the clear-based discard are this design's choice.
module dcpt_candidate_buffer
  import dcpt_pkg::*;
#(
  parameter int unsigned DEPTH  = DCPT_N_DELTAS - 2,
  parameter int unsigned ADDR_W = DCPT_ADDR_W,
  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CNT_W = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              push,
  input  logic [ADDR_W-1:0] push_addr,
  input  logic              pop,
  output logic              empty,
  output logic              full,
  output logic [ADDR_W-1:0] head_addr,
  output logic [CNT_W-1:0]  count
);

  logic [ADDR_W-1:0] buf_q [DEPTH];
  logic [IDX_W-1:0]  rd_ptr, wr_ptr;

  assign empty     = (count == '0);
  assign full      = (count == CNT_W'(DEPTH));
  assign head_addr = buf_q[rd_ptr];

  function automatic logic [IDX_W-1:0] inc(input logic [IDX_W-1:0] p);
    return (p == IDX_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  logic do_push, do_pop;
  assign do_push = push && !full && !clear;
  assign do_pop  = pop && !empty && !clear;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (clear) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= inc(rd_ptr);
      count <= count + CNT_W'(do_push) - CNT_W'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) buf_q[wr_ptr] <= push_addr;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && !clear && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && !clear && empty));

endmodule
