// tb_dcpt_sweep: the end-to-end test at the sizes of the DCPT parameter
// studies, each checked against the reference model:
//   256 entries, 16 deltas, 16-bit deltas  (base point of the delta-width and
//                                            history-length studies)
//   256 entries, 16 deltas,  7-bit deltas  (knee of the delta-width study)
//   256 entries, 31 deltas, 16-bit deltas  (longest history studied)
//    10 entries,  3 deltas,  2-bit deltas  (smallest table; shortest history
//                                            and narrowest delta that work)
//  1000 entries, 31 deltas, 31-bit deltas  (largest table, widest delta)
// All mechanisms must occur at the base point and the longest history; at
// the other sizes (where the stream may not produce every case, e.g. no
// eviction in a 1000-entry table) only agreement with the model is required.
module tb_dcpt_sweep;

  logic fin[5];
  int   chk[5], fl[5];

  dcpt_e2e_env #(.E(256),  .ND(16), .DW(16), .CHECK_MECH(1'b1)) u_base  (.finished(fin[0]), .checks(chk[0]), .failures(fl[0]));
  dcpt_e2e_env #(.E(256),  .ND(16), .DW(7),  .CHECK_MECH(1'b0)) u_knee  (.finished(fin[1]), .checks(chk[1]), .failures(fl[1]));
  dcpt_e2e_env #(.E(256),  .ND(31), .DW(16), .CHECK_MECH(1'b1)) u_long  (.finished(fin[2]), .checks(chk[2]), .failures(fl[2]));
  dcpt_e2e_env #(.E(10),   .ND(3),  .DW(2),  .CHECK_MECH(1'b0)) u_small (.finished(fin[3]), .checks(chk[3]), .failures(fl[3]));
  dcpt_e2e_env #(.E(1000), .ND(31), .DW(31), .CHECK_MECH(1'b0)) u_large (.finished(fin[4]), .checks(chk[4]), .failures(fl[4]));

  int checks, failures;

  task automatic total();
    checks = 0; failures = 0;
    for (int i = 0; i < 5; i++) begin checks += chk[i]; failures += fl[i]; end
  endtask

  initial begin
    #1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    total();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
