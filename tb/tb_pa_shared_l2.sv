// tb_pa_shared_l2: end-to-end test of the power-aware partitioned shared L2
// at a reduced size (8 ways x 8 sets, 2^6-access sampling interval,
// 8 fraction bits for D, thresholds 0.1 / 0.5), two core traffic models and
// a 100-cycle memory model. Every read is checked against the cores'
// shadow data and every hit against the 14-cycle latency throughout.
//   Phase A: core 0 "hot" (MRU hits, D0 = 0), core 1 cycles through as
//     many lines per set as it has ways (LRU hits, large D1). Expected:
//     ways move to core 1, core 0's state machine reaches DEC and its ways
//     are flushed and powered down, core 1 powers up what it receives, and
//     moves are refused once core 0 is at its minimum.
//   Phase B: both hot: core 1 powers ways down as well.
//   Phase C: core 1 cyclic again while both hold powered-off ways: the
//     allocation move is skipped and core 1 powers ways up.
//   Phase D: partitioning off (conventional shared cache): all ways on.
// Invariants checked at every decision: each core owns and powers at
// least two ways. Each mechanism is counted and must occur at least once.
module tb_pa_shared_l2;
  import wac_pkg::*;
  localparam int W = 8, S = 8, N = 6, FB = 8, HL = 14;
  localparam int DW = N + 1 + FB, AW = 32, LB = 512, PB = 256, LAW = AW - 6;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic part_en;
  logic [DW-1:0] t1, t2;
  logic              c_valid [NUM_CORES];
  logic              c_ready [NUM_CORES];
  logic              c_we    [NUM_CORES];
  logic [AW-1:0]     c_addr  [NUM_CORES];
  logic [PB-1:0]     c_wdata [NUM_CORES];
  logic              c_rsp   [NUM_CORES];
  logic              rsp_hit;
  logic [PB-1:0]     rsp_rdata;
  logic m_valid, m_ready, m_we, m_rvalid;
  logic [LAW-1:0] m_addr;
  logic [LB-1:0] m_wdata, m_rdata;
  logic [W-1:0] power, owner;
  logic [DW-1:0] d [NUM_CORES];
  logic interval;
  resize_e cmd [NUM_CORES];
  resize_e lreq [NUM_CORES];
  logic [2:0] sm_state [NUM_CORES];
  wac_events_t ev;

  pa_shared_l2 #(.WAYS(W), .SETS(S), .HIT_LAT(HL), .SAMPLE_BITS(N), .FRAC_BITS(FB)) dut (
    .clk, .rst_n, .part_en_i(part_en), .t1_i(t1), .t2_i(t2),
    .c_req_valid_i(c_valid), .c_req_ready_o(c_ready), .c_req_we_i(c_we),
    .c_req_addr_i(c_addr), .c_req_wdata_i(c_wdata),
    .c_rsp_valid_o(c_rsp), .c_rsp_hit_o(rsp_hit), .c_rsp_rdata_o(rsp_rdata),
    .mem_req_valid_o(m_valid), .mem_req_ready_i(m_ready), .mem_req_we_o(m_we),
    .mem_req_addr_o(m_addr), .mem_req_wdata_o(m_wdata),
    .mem_rsp_valid_i(m_rvalid), .mem_rsp_rdata_i(m_rdata),
    .way_power_o(power), .way_owner_o(owner), .d_o(d), .interval_o(interval),
    .cmd_o(cmd), .lreq_o(lreq), .sm_state_o(sm_state), .events_o(ev));

  mem_model #(.LAW(LAW), .LB(LB), .LAT(100)) u_mem (
    .clk, .rst_n, .req_valid_i(m_valid), .req_ready_o(m_ready), .req_we_i(m_we),
    .req_addr_i(m_addr), .req_wdata_i(m_wdata), .rsp_valid_o(m_rvalid), .rsp_rdata_o(m_rdata));

  logic        en  [NUM_CORES];
  logic        pat [NUM_CORES];
  int unsigned k   [NUM_CORES];
  int unsigned n_acc [NUM_CORES], n_hit [NUM_CORES], c_chk [NUM_CORES], c_fail [NUM_CORES];

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    l2_core_model #(.CORE(c), .ADDR_W(AW), .PB(PB), .LB(LB), .SETS(S), .HIT_LAT(HL)) u_core (
      .clk, .rst_n, .en_i(en[c]), .pat_i(pat[c]), .k_i(k[c]),
      .req_valid_o(c_valid[c]), .req_ready_i(c_ready[c]), .req_we_o(c_we[c]),
      .req_addr_o(c_addr[c]), .req_wdata_o(c_wdata[c]),
      .rsp_valid_i(c_rsp[c]), .rsp_hit_i(rsp_hit), .rsp_rdata_i(rsp_rdata),
      .n_acc(n_acc[c]), .n_hit(n_hit[c]), .checks(c_chk[c]), .failures(c_fail[c]));
  end

  function automatic int cnt(logic [W-1:0] v);
    int r = 0;
    for (int i = 0; i < W; i++) r += int'(v[i]);
    return r;
  endfunction

  // core 1's cyclic working set follows its powered ways
  always_comb begin
    k[0] = 1;
    k[1] = cnt(owner & power);
  end

  // mechanism counters
  int n_int = 0, n_move = 0, n_skip = 0, n_on = 0, n_off = 0, n_inc = 0, n_dec = 0;
  int n_mru = 0, n_lru = 0, n_conflict = 0, n_fl_wb = 0, n_miss_wb = 0, n_allon = 0;
  always @(posedge clk) if (rst_n) begin
    if (interval) begin
      n_int++;
      for (int c = 0; c < 2; c++) begin
        if (cmd[c] == RS_INC) n_inc++;
        if (cmd[c] == RS_DEC) n_dec++;
      end
    end
    if (ev.way_move) n_move++;
    if (ev.way_move_skip) n_skip++;
    if (ev.way_on) n_on++;
    if (ev.way_off) n_off++;
    if (dut.acc_valid && dut.acc_mru) n_mru++;
    if (dut.acc_valid && dut.acc_lru) n_lru++;
    if (c_valid[0] && c_valid[1] && (c_ready[0] || c_ready[1])) n_conflict++;
    if (m_valid && m_ready && m_we) begin
      if (dut.flush_req) n_fl_wb++; else n_miss_wb++;
    end
    // invariants whenever the way manager is idle
    if (part_en && !dut.wm_busy) begin
      checks++;
      if (cnt(~owner) < 2 || cnt(owner) < 2 || cnt(~owner & power) < 2 || cnt(owner & power) < 2) begin
        failures++; $display("FAIL invariant owner=%b power=%b", owner, power);
      end
    end
  end

  task automatic run_intervals(int n_iv);
    automatic int target = n_int + n_iv;
    automatic int guard = 0;
    while (n_int < target && guard < 400000) begin @(posedge clk); guard++; end
  endtask

  initial begin
    part_en = 1'b1;
    t1 = DW'(26);    // 0.1
    t2 = DW'(128);   // 0.5
    en = '{1'b0, 1'b0}; pat = '{1'b0, 1'b1};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    en = '{1'b1, 1'b1};
    // phase A
    run_intervals(30);
    $display("after A: owner=%b power=%b moves=%0d skips=%0d on=%0d off=%0d", owner, power, n_move, n_skip, n_on, n_off);
    checks++;
    if (cnt(owner) <= W / 2) begin failures++; $display("FAIL core 1 did not gain ways"); end
    checks++;
    if (cnt(~owner & power) != 2) begin failures++; $display("FAIL core 0 not down to 2 powered ways"); end
    // phase B
    pat[1] = 1'b0;
    run_intervals(20);
    $display("after B: owner=%b power=%b", owner, power);
    checks++;
    if (cnt(owner & power) != 2) begin failures++; $display("FAIL core 1 not down to 2 powered ways"); end
    // phase C
    pat[1] = 1'b1;
    run_intervals(10);
    $display("after C: owner=%b power=%b moves=%0d skips=%0d on=%0d off=%0d", owner, power, n_move, n_skip, n_on, n_off);
    // phase D
    part_en = 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (power != '1) begin failures++; $display("FAIL not all ways on in shared mode"); end
    else n_allon++;
    repeat (20000) @(posedge clk);
    en = '{1'b0, 1'b0};
    repeat (400) @(posedge clk);
    // mechanisms
    checks += 12;
    if (n_int == 0)      begin failures++; $display("FAIL no interval decision"); end
    if (n_move == 0)     begin failures++; $display("FAIL no way moved"); end
    if (n_skip == 0)     begin failures++; $display("FAIL no allocation skipped"); end
    if (n_on == 0)       begin failures++; $display("FAIL no way powered up"); end
    if (n_off == 0)      begin failures++; $display("FAIL no way powered down"); end
    if (n_inc == 0)      begin failures++; $display("FAIL no INC command"); end
    if (n_dec == 0)      begin failures++; $display("FAIL no DEC command"); end
    if (n_mru == 0)      begin failures++; $display("FAIL no MRU hit"); end
    if (n_lru == 0)      begin failures++; $display("FAIL no LRU hit"); end
    if (n_conflict == 0) begin failures++; $display("FAIL no arbitration conflict"); end
    if (n_fl_wb == 0)    begin failures++; $display("FAIL no flush write-back"); end
    if (n_miss_wb == 0)  begin failures++; $display("FAIL no eviction write-back"); end
    $display("intervals=%0d moves=%0d skips=%0d on=%0d off=%0d INC=%0d DEC=%0d mru=%0d lru=%0d conflicts=%0d flush_wb=%0d evict_wb=%0d all_on=%0d",
             n_int, n_move, n_skip, n_on, n_off, n_inc, n_dec, n_mru, n_lru, n_conflict, n_fl_wb, n_miss_wb, n_allon);
    $display("core0 acc=%0d hit=%0d  core1 acc=%0d hit=%0d", n_acc[0], n_hit[0], n_acc[1], n_hit[1]);
    checks   += int'(c_chk[0] + c_chk[1]);
    failures += int'(c_fail[0] + c_fail[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
