// tb_dcpt_candidate_buffer: self-checking test of the candidate FIFO.
//
// Random pushes, pops and occasional clears at the default depth, with the
// pushes kept from overrunning the buffer as the generator never does. After
// every clock edge the count, empty/full flags and head are compared with a
// queue model; a fill to the full depth and a clear of a full buffer are
// forced at the start.
module tb_dcpt_candidate_buffer;
  import dcpt_pkg::*;

  localparam int unsigned DEPTH = DCPT_N_DELTAS - 2;
  localparam int unsigned AW    = DCPT_ADDR_W;
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic clk = 0, rst_n = 0;
  logic clear, push, pop, empty, full;
  logic [AW-1:0] push_addr, head_addr;
  logic [CW-1:0] count;

  int checks = 0, failures = 0;
  logic [AW-1:0] model[$];

  dcpt_candidate_buffer dut (.clk, .rst_n, .clear, .push, .push_addr, .pop,
                             .empty, .full, .head_addr, .count);

  always #5 clk = ~clk;

  task automatic step(input bit c, input bit pu, input bit po);
    clear = c; push = pu; pop = po; push_addr = AW'($urandom);
    @(posedge clk);
    if (c) model.delete();
    else begin
      if (po && model.size() > 0) void'(model.pop_front());
      if (pu) model.push_back(push_addr);
    end
    #1;
    checks++;
    if (count !== CW'(model.size()) || empty !== (model.size() == 0) ||
        full !== (model.size() == DEPTH) ||
        (model.size() > 0 && head_addr !== model[0])) begin
      failures++;
      $display("FAIL count %0d/%0d head %h", count, model.size(), head_addr);
    end
  endtask

  initial begin
    clear = 0; push = 0; pop = 0; push_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int i = 0; i < DEPTH; i++) step(0, 1, 0);
    step(1, 0, 0);
    for (int i = 0; i < 5; i++) step(0, 1, 0);
    for (int i = 0; i < 5; i++) step(0, 0, 1);
    for (int n = 0; n < 4000; n++) begin
      automatic bit c  = ($urandom_range(40) == 0);
      automatic bit pu = ($urandom_range(1) == 1) && (model.size() < DEPTH);
      automatic bit po = ($urandom_range(2) != 0) && (model.size() > 0);
      step(c, pu, po);
    end
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
