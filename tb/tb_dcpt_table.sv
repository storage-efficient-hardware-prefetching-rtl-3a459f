// tb_dcpt_table: self-checking test of the prediction table.
//
// At the default size of 98 entries, the test allocates entries for new PCs
// in FIFO order and updates entries of known PCs, exactly as the prefetcher
// uses the table, while a model keeps the same entries. Each step first
// looks a PC up and compares hit, index, victim slot and all fields with the
// model. The PC pool is larger than the table so that entries are evicted
// (the oldest allocation goes first) and evicted PCs miss again afterwards.
module tb_dcpt_table;
  import dcpt_pkg::*;

  localparam int unsigned E  = DCPT_TABLE_ENTRIES;
  localparam int unsigned PCW = DCPT_PC_W;
  localparam int unsigned AW = DCPT_ADDR_W;
  localparam int unsigned ND = DCPT_N_DELTAS;
  localparam int unsigned DW = DCPT_DELTA_W;
  localparam int unsigned IW = $clog2(E);
  localparam int unsigned PW = $clog2(ND);

  logic clk = 0, rst_n = 0;
  logic [PCW-1:0] lk_pc, wr_pc;
  logic lk_hit, wr_en, wr_alloc;
  logic [IW-1:0] lk_idx, lk_victim, wr_idx;
  logic [AW-1:0] lk_last_addr, lk_last_pf, wr_last_addr, wr_last_pf;
  logic [ND-1:0][DW-1:0] lk_deltas, wr_deltas;
  logic [PW-1:0] lk_ptr, wr_ptr;

  int checks = 0, failures = 0, evictions = 0, hits = 0;

  dcpt_table dut (.clk, .rst_n, .lk_pc, .lk_hit, .lk_idx, .lk_victim,
    .lk_last_addr, .lk_last_pf, .lk_deltas, .lk_ptr, .wr_en, .wr_alloc,
    .wr_idx, .wr_pc, .wr_last_addr, .wr_last_pf, .wr_deltas, .wr_ptr);

  always #5 clk = ~clk;

  // model
  bit                    m_valid [E];
  logic [PCW-1:0]        m_pc    [E];
  logic [AW-1:0]         m_la    [E];
  logic [AW-1:0]         m_lp    [E];
  logic [ND-1:0][DW-1:0] m_d     [E];
  logic [PW-1:0]         m_ptr   [E];
  int                    m_repl = 0;

  task automatic access(input logic [PCW-1:0] pc);
    int idx = -1;
    for (int i = 0; i < int'(E); i++) if (m_valid[i] && m_pc[i] == pc) idx = i;
    lk_pc = pc;
    #1;
    checks++;
    if (lk_hit !== (idx >= 0) || lk_victim !== IW'(m_repl) ||
        (idx >= 0 && (lk_idx !== IW'(idx) || lk_last_addr !== m_la[idx] ||
                      lk_last_pf !== m_lp[idx] || lk_deltas !== m_d[idx] ||
                      lk_ptr !== m_ptr[idx]))) begin
      failures++;
      $display("FAIL pc=%h hit %b/%b idx %0d/%0d victim %0d/%0d", pc, lk_hit, idx >= 0,
               lk_idx, idx, lk_victim, m_repl);
    end
    if (idx >= 0) hits++;
    wr_en = 1;
    wr_alloc = (idx < 0);
    if (idx < 0) begin
      if (m_valid[m_repl]) evictions++;
      idx = m_repl;
      m_repl = (m_repl + 1) % E;
    end
    wr_idx = IW'(idx);
    wr_pc = pc;
    wr_last_addr = AW'($urandom);
    wr_last_pf = AW'($urandom);
    for (int i = 0; i < int'(ND); i++) wr_deltas[i] = DW'($urandom);
    wr_ptr = PW'($urandom_range(ND - 1));
    @(posedge clk);
    m_valid[idx] = 1; m_pc[idx] = pc; m_la[idx] = wr_last_addr;
    m_lp[idx] = wr_last_pf; m_d[idx] = wr_deltas; m_ptr[idx] = wr_ptr;
    #1;
    wr_en = 0;
  endtask

  initial begin
    lk_pc = '0; wr_en = 0; wr_alloc = 0; wr_idx = '0; wr_pc = '0;
    wr_last_addr = '0; wr_last_pf = '0; wr_deltas = '0; wr_ptr = '0;
    foreach (m_valid[i]) m_valid[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1;
    for (int n = 0; n < 3000; n++) begin
      // pool of 130 PCs: more than the table holds
      access(PCW'(32'h0040_0000 + 4 * $urandom_range(129)));
    end
    checks++;
    if (evictions == 0 || hits == 0) begin
      failures++;
      $display("FAIL evictions=%0d hits=%0d", evictions, hits);
    end
    $display("evictions=%0d hits=%0d", evictions, hits);
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
