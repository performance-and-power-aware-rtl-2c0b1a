// tb_pa_shared_l2_full: the shared L2 at its default size (1 MB, 32 ways,
// 512 sets, 64-byte lines, 14-cycle hits, 2^16-access sampling interval,
// 3-bit asymmetric state machines), with the performance-oriented
// thresholds T1 = 0.001 and T2 = 0.005 (66 and 328 in the 16-fraction-bit
// format of D). Core 0 runs a "hot" pattern (MRU hits, D0 = 0) and core 1
// cycles through as many lines per set as it has ways (LRU hits, large D1).
// Over the first intervals the decision must move ways from core 0 to
// core 1; after seven intervals of "fewer ways" requests core 0's state
// machine issues DEC and one of its ways is flushed (all 512 sets walked,
// dirty lines written back) and powered down. Every read is checked
// against the cores' shadow data and every hit against the 14-cycle
// latency.
module tb_pa_shared_l2_full;
  import wac_pkg::*;
  localparam int W = 32, S = 512, DW = 33, AW = 32, LB = 512, PB = 256, LAW = AW - 6;
  localparam int INTERVALS = 8;

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

  pa_shared_l2 dut (
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
    l2_core_model #(.CORE(c), .ADDR_W(AW), .PB(PB), .LB(LB), .SETS(S), .HIT_LAT(14)) u_core (
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

  always_comb begin
    k[0] = 1;
    k[1] = cnt(owner & power);
  end

  int n_int = 0, n_move = 0, n_off = 0, n_dec = 0, n_fl_wb = 0;
  always @(posedge clk) if (rst_n) begin
    if (interval) begin
      n_int++;
      if (cmd[0] == RS_DEC) n_dec++;
      $display("interval %0d: D0=%0d D1=%0d cmd0=%0d cmd1=%0d core1 owns %0d", n_int, d[0], d[1], cmd[0], cmd[1], cnt(owner));
    end
    if (ev.way_move) n_move++;
    if (ev.way_off) n_off++;
    if (m_valid && m_ready && m_we && dut.flush_req) n_fl_wb++;
  end

  initial begin
    part_en = 1'b1;
    t1 = DW'(66);
    t2 = DW'(328);
    en = '{1'b0, 1'b0}; pat = '{1'b0, 1'b1};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    en = '{1'b1, 1'b1};
    while (n_int < INTERVALS) @(posedge clk);
    while (dut.wm_busy) @(posedge clk);
    en = '{1'b0, 1'b0};
    repeat (400) @(posedge clk);
    checks += 4;
    if (n_move == 0) begin failures++; $display("FAIL no way moved to core 1"); end
    if (cnt(owner) <= W / 2) begin failures++; $display("FAIL core 1 owns %0d ways", cnt(owner)); end
    if (n_dec == 0 || n_off == 0) begin failures++; $display("FAIL core 0 never powered a way down"); end
    if (n_fl_wb == 0) begin failures++; $display("FAIL flush wrote nothing back"); end
    $display("intervals=%0d moves=%0d DEC=%0d off=%0d flush_wb=%0d owner=%b power=%b",
             n_int, n_move, n_dec, n_off, n_fl_wb, owner, power);
    $display("core0 acc=%0d hit=%0d  core1 acc=%0d hit=%0d", n_acc[0], n_hit[0], n_acc[1], n_hit[1]);
    checks   += int'(c_chk[0] + c_chk[1]);
    failures += int'(c_fail[0] + c_fail[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #400000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
