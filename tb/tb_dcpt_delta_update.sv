// tb_dcpt_delta_update: self-checking test of the delta update rule.
//
// Drives random and corner-case (zero delta, both ends of the 12-bit range
// and one beyond, pointer wrap) miss/last address pairs into the
// combinational update and compares the new delta buffer, pointer, zero and
// overflow flags with a model computed here with 64-bit integer arithmetic.
module tb_dcpt_delta_update;
  import dcpt_pkg::*;

  localparam int unsigned AW = DCPT_ADDR_W;
  localparam int unsigned ND = DCPT_N_DELTAS;
  localparam int unsigned DW = DCPT_DELTA_W;
  localparam int unsigned PW = $clog2(ND);

  logic [AW-1:0]          miss_addr, last_addr;
  logic [ND-1:0][DW-1:0]  din, dout;
  logic [PW-1:0]          pin, pout;
  logic                   dzero, ovf;

  int checks = 0, failures = 0;

  dcpt_delta_update dut (
    .miss_addr, .last_addr, .deltas_in(din), .ptr_in(pin),
    .deltas_out(dout), .ptr_out(pout), .delta_zero(dzero), .overflow(ovf)
  );

  task automatic check_one(input longint d, input int unsigned p);
    longint sd;
    logic [ND-1:0][DW-1:0] exp_d;
    int unsigned exp_p;
    logic exp_ovf, exp_zero;
    last_addr = AW'($urandom);
    miss_addr = last_addr + AW'(d);
    for (int i = 0; i < ND; i++) din[i] = DW'($urandom);
    pin = PW'(p);
    #1;
    // model: delta as a signed 32-bit difference
    sd = longint'($signed(miss_addr - last_addr));
    exp_zero = (sd == 0);
    exp_ovf  = !exp_zero && (sd > 2047 || sd < -2048);
    exp_d = din;
    exp_p = p;
    if (!exp_zero) begin
      exp_d[p] = exp_ovf ? '0 : DW'(sd);
      exp_p = (p + 1) % ND;
    end
    checks++;
    if (dout !== exp_d || pout !== PW'(exp_p) || dzero !== exp_zero || ovf !== exp_ovf) begin
      failures++;
      $display("FAIL d=%0d p=%0d: ptr %0d/%0d zero %b/%b ovf %b/%b", d, p,
               pout, exp_p, dzero, exp_zero, ovf, exp_ovf);
    end
  endtask

  initial begin
    longint corner[] = '{0, 1, -1, 9, 2047, -2048, 2048, -2049, 100000, -100000};
    foreach (corner[k])
      for (int p = 0; p < ND; p++) check_one(corner[k], p);
    for (int n = 0; n < 3000; n++) begin
      longint d;
      case ($urandom_range(2))
        0: d = longint'($urandom_range(4095)) - 2048;
        1: d = longint'($urandom_range(16)) - 8;
        default: d = longint'($signed($urandom));
      endcase
      check_one(d, $urandom_range(ND - 1));
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
