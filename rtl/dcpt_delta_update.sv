// dcpt_delta_update: trains one table entry with a new miss address.
//
// The delta is the new line address minus the entry's last address. A zero
// delta leaves the delta buffer and its pointer unchanged. A non-zero delta is
// written at the delta pointer (the head, i.e. the oldest slot) and the
// pointer advances, wrapping after N_DELTAS slots. A delta that does not fit
// in DELTA_W bits as a two's complement number (range -2^(DELTA_W-1) to
// 2^(DELTA_W-1)-1) is stored as 0, which marks the overflow. All of this
// follows the DCPT update rule; the two's complement range is read from the
// stated range of an n-bit delta.
//
// Purely combinational; the caller writes the result back into the table.
module dcpt_delta_update
  import dcpt_pkg::*;
#(
  parameter int unsigned ADDR_W   = DCPT_ADDR_W,
  parameter int unsigned N_DELTAS = DCPT_N_DELTAS,
  parameter int unsigned DELTA_W  = DCPT_DELTA_W,
  localparam int unsigned PTR_W   = (N_DELTAS > 1) ? $clog2(N_DELTAS) : 1
) (
  input  logic [ADDR_W-1:0]                  miss_addr,
  input  logic [ADDR_W-1:0]                  last_addr,
  input  logic [N_DELTAS-1:0][DELTA_W-1:0]   deltas_in,
  input  logic [PTR_W-1:0]                   ptr_in,
  output logic [N_DELTAS-1:0][DELTA_W-1:0]   deltas_out,
  output logic [PTR_W-1:0]                   ptr_out,
  output logic                               delta_zero,  // no update made
  output logic                               overflow     // stored as 0
);

  logic [ADDR_W-1:0]  delta;
  logic [DELTA_W-1:0] stored;

  assign delta      = miss_addr - last_addr;
  assign delta_zero = (delta == '0);
  // Fits when the bits above the DELTA_W-bit field are all copies of its sign.
  assign overflow   = !delta_zero &&
                      (delta != ADDR_W'($signed(delta[DELTA_W-1:0])));
  assign stored     = overflow ? '0 : delta[DELTA_W-1:0];

  always_comb begin
    deltas_out = deltas_in;
    ptr_out    = ptr_in;
    if (!delta_zero) begin
      deltas_out[ptr_in] = stored;
      ptr_out = (ptr_in == PTR_W'(N_DELTAS - 1)) ? '0 : ptr_in + 1'b1;
    end
  end

endmodule
