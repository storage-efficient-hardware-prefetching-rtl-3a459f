// dcpt_table: the Delta Correlating Prediction Table.
//
// Each entry belongs to one load instruction and holds its PC, the line
// address of its last miss ("last address"), the address of the last
// prefetch issued on its behalf ("last prefetch"), a circular buffer of its
// N_DELTAS most recent non-zero address deltas and the delta pointer, which
// marks the head (the oldest delta, i.e. the next slot to be written). The
// entry layout follows the DCPT entry format; the table organisation is this
// design's choice: it is fully associative (the PC is compared against every
// valid entry in parallel), and a new PC replaces the entries in FIFO order,
// so the entry evicted is the one allocated longest ago. After reset all
// entries are invalid; the FIFO pointer starts at entry 0, so the table fills
// before anything is evicted.
//
// Interface and timing:
//   lookup  - combinational: lk_pc in, lk_hit/lk_idx and the hit entry's
//             fields out in the same cycle; lk_victim is the slot a new PC
//             would take and lk_victim_valid says whether taking it evicts
//             another load's entry.
//   write   - wr_en at a clock edge stores a whole entry at wr_idx and marks
//             it valid. wr_alloc says the write allocates a new PC, which
//             advances the FIFO replacement pointer.
module dcpt_table
  import dcpt_pkg::*;
#(
  parameter int unsigned ENTRIES  = DCPT_TABLE_ENTRIES,
  parameter int unsigned PC_W     = DCPT_PC_W,
  parameter int unsigned ADDR_W   = DCPT_ADDR_W,
  parameter int unsigned N_DELTAS = DCPT_N_DELTAS,
  parameter int unsigned DELTA_W  = DCPT_DELTA_W,
  localparam int unsigned IDX_W   = (ENTRIES > 1) ? $clog2(ENTRIES) : 1,
  localparam int unsigned PTR_W   = (N_DELTAS > 1) ? $clog2(N_DELTAS) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // lookup
  input  logic [PC_W-1:0]                    lk_pc,
  output logic                               lk_hit,
  output logic [IDX_W-1:0]                   lk_idx,
  output logic [IDX_W-1:0]                   lk_victim,
  output logic                               lk_victim_valid,
  output logic [ADDR_W-1:0]                  lk_last_addr,
  output logic [ADDR_W-1:0]                  lk_last_pf,
  output logic [N_DELTAS-1:0][DELTA_W-1:0]   lk_deltas,
  output logic [PTR_W-1:0]                   lk_ptr,
  // write
  input  logic                               wr_en,
  input  logic                               wr_alloc,
  input  logic [IDX_W-1:0]                   wr_idx,
  input  logic [PC_W-1:0]                    wr_pc,
  input  logic [ADDR_W-1:0]                  wr_last_addr,
  input  logic [ADDR_W-1:0]                  wr_last_pf,
  input  logic [N_DELTAS-1:0][DELTA_W-1:0]   wr_deltas,
  input  logic [PTR_W-1:0]                   wr_ptr
);

  typedef struct packed {
    logic [PC_W-1:0]                  pc;
    logic [ADDR_W-1:0]                last_addr;
    logic [ADDR_W-1:0]                last_pf;
    logic [N_DELTAS-1:0][DELTA_W-1:0] deltas;
    logic [PTR_W-1:0]                 ptr;
  } entry_t;

  entry_t             mem   [ENTRIES];
  logic [ENTRIES-1:0] valid;
  logic [IDX_W-1:0]   repl_ptr;

  // Parallel tag compare; a PC is never stored twice, so at most one hits.
  always_comb begin
    lk_hit = 1'b0;
    lk_idx = '0;
    for (int unsigned i = 0; i < ENTRIES; i++) begin
      if (valid[i] && mem[i].pc == lk_pc) begin
        lk_hit = 1'b1;
        lk_idx = IDX_W'(i);
      end
    end
  end

  assign lk_victim       = repl_ptr;
  assign lk_victim_valid = valid[repl_ptr];
  assign lk_last_addr = mem[lk_idx].last_addr;
  assign lk_last_pf   = mem[lk_idx].last_pf;
  assign lk_deltas    = mem[lk_idx].deltas;
  assign lk_ptr       = mem[lk_idx].ptr;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem[wr_idx] <= '{pc: wr_pc, last_addr: wr_last_addr, last_pf: wr_last_pf,
                       deltas: wr_deltas, ptr: wr_ptr};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid    <= '0;
      repl_ptr <= '0;
    end else begin
      if (wr_en) valid[wr_idx] <= 1'b1;
      if (wr_en && wr_alloc)
        repl_ptr <= (repl_ptr == IDX_W'(ENTRIES - 1)) ? '0 : repl_ptr + 1'b1;
    end
  end

endmodule
