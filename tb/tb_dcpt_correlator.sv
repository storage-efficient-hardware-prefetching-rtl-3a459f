// tb_dcpt_correlator: self-checking test of the delta pair search.
//
// First the worked example of the algorithm: the deltas 1, 9, 1, 9 as the
// four newest of the history must match at the start of that run, so the
// deltas 1 and 9 are replayed. Then random histories over a small alphabet
// (so matches are common) with random head pointers; the unrolled time order,
// the match flag and the oldest matching position are compared with a model.
module tb_dcpt_correlator;
  import dcpt_pkg::*;

  localparam int unsigned ND = DCPT_N_DELTAS;
  localparam int unsigned DW = DCPT_DELTA_W;
  localparam int unsigned PW = $clog2(ND);

  logic [ND-1:0][DW-1:0] deltas, chrono;
  logic [PW-1:0]         ptr, match_pos;
  logic                  match;

  int checks = 0, failures = 0;

  dcpt_correlator dut (.deltas, .ptr, .chrono, .match, .match_pos);

  task automatic compare();
    logic [ND-1:0][DW-1:0] c;
    bit m;
    int pos;
    for (int i = 0; i < ND; i++) c[i] = deltas[(int'(ptr) + i) % ND];
    m = 0; pos = 0;
    for (int i = 0; i <= int'(ND) - 3; i++)
      if (!m && c[i] == c[ND-2] && c[i+1] == c[ND-1]) begin m = 1; pos = i; end
    checks++;
    if (chrono !== c || match !== m || (m && match_pos !== PW'(pos))) begin
      failures++;
      $display("FAIL ptr=%0d match %b/%b pos %0d/%0d", ptr, match, m, match_pos, pos);
    end
  endtask

  initial begin
    // worked example: history ... 0 0 1 9 1 9, newest last, head at slot 5
    deltas = '0;
    ptr = PW'(5);
    deltas[(5 + ND - 4) % ND] = DW'(1);
    deltas[(5 + ND - 3) % ND] = DW'(9);
    deltas[(5 + ND - 2) % ND] = DW'(1);
    deltas[(5 + ND - 1) % ND] = DW'(9);
    #1;
    checks++;
    if (!match || match_pos != PW'(ND - 4) || chrono[ND-2] != DW'(1) || chrono[ND-1] != DW'(9)) begin
      failures++;
      $display("FAIL worked example: match=%b pos=%0d", match, match_pos);
    end
    compare();
    for (int n = 0; n < 5000; n++) begin
      automatic int unsigned alpha = (n % 3 == 0) ? 2 : 4;
      for (int i = 0; i < ND; i++) deltas[i] = DW'($urandom_range(alpha - 1));
      if (n % 7 == 0) for (int i = 0; i < ND; i++) deltas[i] = DW'($urandom);
      ptr = PW'($urandom_range(ND - 1));
      #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
