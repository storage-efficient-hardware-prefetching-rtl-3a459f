// tb_dcpt_pf_queue: self-checking test of the in-flight prefetch buffer.
//
// Random allocations, completions and lookups over a small address range so
// that hits, duplicate completions and a full buffer all occur. The hit
// flag, the full flag and the occupancy are compared with a model that keeps
// the outstanding addresses in a queue; an allocation into a full buffer is
// ignored by both. The test also fills the buffer to exactly 32 entries and
// checks that "full" rises at that point and not before.
module tb_dcpt_pf_queue;
  import dcpt_pkg::*;

  localparam int unsigned ENTRIES = DCPT_PFQ_ENTRIES;
  localparam int unsigned AW      = DCPT_ADDR_W;
  localparam int unsigned CW      = $clog2(ENTRIES + 1);

  logic clk = 0, rst_n = 0;
  logic [AW-1:0] lk_addr, alloc_addr, done_addr;
  logic lk_hit, full, alloc, done;
  logic [CW-1:0] count;

  int checks = 0, failures = 0;
  int full_seen = 0;
  logic [AW-1:0] model[$];

  dcpt_pf_queue dut (.clk, .rst_n, .lk_addr, .lk_hit, .full, .count,
                     .alloc, .alloc_addr, .done, .done_addr);

  always #5 clk = ~clk;

  function automatic bit in_model(input logic [AW-1:0] a);
    foreach (model[i]) if (model[i] == a) return 1;
    return 0;
  endfunction

  task automatic step(input bit al, input logic [AW-1:0] aa,
                      input bit dn, input logic [AW-1:0] da,
                      input logic [AW-1:0] la);
    alloc = al; alloc_addr = aa; done = dn; done_addr = da; lk_addr = la;
    #1;
    checks++;
    if (lk_hit !== in_model(la) || full !== (model.size() == ENTRIES) ||
        count !== CW'(model.size())) begin
      failures++;
      $display("FAIL hit %b/%b full %b count %0d/%0d", lk_hit, in_model(la), full,
               count, model.size());
    end
    if (full) full_seen++;
    @(posedge clk);
    if (dn) for (int i = model.size() - 1; i >= 0; i--) if (model[i] == da) model.delete(i);
    #1;
  endtask

  // One clock: completions are applied by step(); an allocation counts only
  // if the buffer was not full before the edge.
  task automatic cycle(input bit al, input logic [AW-1:0] aa,
                       input bit dn, input logic [AW-1:0] da,
                       input logic [AW-1:0] la);
    bit was_full = (model.size() == ENTRIES);
    step(al, aa, dn, da, la);
    if (al && !was_full) model.push_back(aa);
  endtask

  initial begin
    alloc = 0; done = 0; alloc_addr = '0; done_addr = '0; lk_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    // exact fill
    for (int i = 0; i < ENTRIES; i++) begin
      cycle(1, AW'(1000 + i), 0, '0, AW'(1000 + i));
      checks++;
      if ((i < ENTRIES - 1) && full) begin failures++; $display("FAIL early full at %0d", i); end
    end
    cycle(1, AW'(5000), 0, '0, AW'(5000));   // dropped: buffer full
    cycle(0, '0, 1, AW'(1003), AW'(1003));
    cycle(1, AW'(5000), 0, '0, AW'(5000));
    cycle(0, '0, 0, '0, AW'(5000));
    for (int i = 0; i < ENTRIES; i++) cycle(0, '0, 1, AW'(1000 + i), AW'(1000 + i));
    cycle(0, '0, 1, AW'(5000), AW'(5000));
    for (int n = 0; n < 6000; n++) begin
      cycle($urandom_range(3) != 0, AW'($urandom_range(60)),
            $urandom_range(2) == 0, AW'($urandom_range(60)), AW'($urandom_range(60)));
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL buffer never full"); end
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
