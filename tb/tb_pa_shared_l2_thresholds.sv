// tb_pa_shared_l2_thresholds: the three threshold settings of the power
// control, (T1, T2) = (0.1, 0.5), (0.01, 0.05) and (0.001, 0.005), run side
// by side on three copies of the shared L2 with identical traffic.
// Size: 8 ways, 64 sets, 2^10-access intervals; D keeps its 16 fraction
// bits, so the thresholds have their exact encodings (6554/32768,
// 655/3277, 66/328).
// Core 0 mixes MRU hits with one LRU hit in every 32 accesses
// (D0 = 1/31 = 0.032); core 1 only hits its MRU lines (D1 = 0).
// Expected:
//   * from the fifth interval on (core 0 has taken its ways by the end of
//     the third, and its deep sets need one interval to warm up again after
//     each change of its way count), core 0's threshold request is dec, keep and inc for the three
//     settings (0.032 lies below 0.1, between 0.01 and 0.05, above 0.005);
//   * core 0 takes ways from core 1 until core 1 is down to 2;
//   * with the energy-oriented setting the asymmetric state machine issues
//     DEC from the 7th dec on and core 0 ends with 2 powered ways, while the
//     two other settings keep all 6 of its ways powered.
// Every hit's latency is checked too.
module tb_pa_shared_l2_thresholds;
  import wac_pkg::*;
  localparam int W = 8, S = 64, N = 10, FB = 16, DW = N + 1 + FB;
  localparam int AW = 32, LB = 512, PB = 256, LAW = AW - 6;
  localparam int INTERVALS = 14;
  localparam int NSET = 3;
  localparam logic [DW-1:0] T1 [NSET] = '{DW'(6554), DW'(655), DW'(66)};
  localparam logic [DW-1:0] T2 [NSET] = '{DW'(32768), DW'(3277), DW'(328)};
  localparam resize_e EXP [NSET] = '{RS_DEC, RS_KEEP, RS_INC};
  localparam int EXP_ON0 [NSET] = '{2, 6, 6};

  logic clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b1; end
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic int cnt(logic [W-1:0] v);
    int r = 0;
    for (int i = 0; i < W; i++) r += int'(v[i]);
    return r;
  endfunction

  logic en = 1'b0;
  int n_int [NSET], n_req_ok [NSET], n_req_bad [NSET], n_dec [NSET], n_move [NSET];
  int on0 [NSET], own0 [NSET];  // core 0's powered and owned ways
  int unsigned d0_last [NSET];
  int unsigned drv_chk [NSET][NUM_CORES], drv_fail [NSET][NUM_CORES];

  for (genvar g = 0; g < NSET; g++) begin : g_set
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
    int unsigned k [NUM_CORES];
    int unsigned n_acc [NUM_CORES];

    pa_shared_l2 #(.WAYS(W), .SETS(S), .SAMPLE_BITS(N), .FRAC_BITS(FB)) dut (
      .clk, .rst_n, .part_en_i(1'b1), .t1_i(T1[g]), .t2_i(T2[g]),
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

    always_comb begin
      k[0] = cnt(~owner & power);
      k[1] = cnt(owner & power);
    end

    l2_mix_driver #(.CORE(0), .SETS(S), .MIX(32)) u_c0 (
      .clk, .rst_n, .en_i(en), .k_i(k[0]),
      .req_valid_o(c_valid[0]), .req_ready_i(c_ready[0]), .req_we_o(c_we[0]),
      .req_addr_o(c_addr[0]), .req_wdata_o(c_wdata[0]),
      .rsp_valid_i(c_rsp[0]), .rsp_hit_i(rsp_hit),
      .n_acc(n_acc[0]), .checks(drv_chk[g][0]), .failures(drv_fail[g][0]));
    l2_mix_driver #(.CORE(1), .SETS(S), .MIX(0)) u_c1 (
      .clk, .rst_n, .en_i(en), .k_i(k[1]),
      .req_valid_o(c_valid[1]), .req_ready_i(c_ready[1]), .req_we_o(c_we[1]),
      .req_addr_o(c_addr[1]), .req_wdata_o(c_wdata[1]),
      .rsp_valid_i(c_rsp[1]), .rsp_hit_i(rsp_hit),
      .n_acc(n_acc[1]), .checks(drv_chk[g][1]), .failures(drv_fail[g][1]));

    initial begin
      n_int[g] = 0; n_req_ok[g] = 0; n_req_bad[g] = 0; n_dec[g] = 0; n_move[g] = 0;
    end
    always @(posedge clk) if (rst_n) begin : mon
      if (interval) begin
        n_int[g]++;
        d0_last[g] = int'(d[0]);
        if (n_int[g] >= 5) begin
          if (lreq[0] == EXP[g]) n_req_ok[g]++;
          else begin
            n_req_bad[g]++;
            $display("FAIL setting %0d interval %0d: D0=%0d request %0d, expected %0d",
                     g, n_int[g], d[0], lreq[0], EXP[g]);
          end
        end
        if (cmd[0] == RS_DEC) n_dec[g]++;
      end
      if (ev.way_move) n_move[g]++;
      on0[g]  = cnt(~owner & power);
      own0[g] = cnt(~owner);
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    en = 1'b1;
    while (n_int[0] < INTERVALS || n_int[1] < INTERVALS || n_int[2] < INTERVALS) @(posedge clk);
    en = 1'b0;
    repeat (2000) @(posedge clk);
    for (int g = 0; g < NSET; g++) begin
      $display("setting %0d (T1=%0d T2=%0d): intervals=%0d last D0=%0d (%0d.%03d) requests ok=%0d bad=%0d DEC=%0d moves=%0d core0 owns %0d, %0d powered",
               g, T1[g], T2[g], n_int[g], d0_last[g], d0_last[g] >> FB, ((d0_last[g] & 32'hFFFF) * 1000) >> FB,
               n_req_ok[g], n_req_bad[g], n_dec[g], n_move[g], own0[g], on0[g]);
      checks += n_req_ok[g] + n_req_bad[g];
      failures += n_req_bad[g];
      checks += 3;
      if (own0[g] != W - 2) begin failures++; $display("FAIL setting %0d: core 0 owns %0d ways", g, own0[g]); end
      if (on0[g] != EXP_ON0[g]) begin failures++; $display("FAIL setting %0d: core 0 has %0d powered ways, expected %0d", g, on0[g], EXP_ON0[g]); end
      if ((n_dec[g] > 0) != (EXP[g] == RS_DEC)) begin failures++; $display("FAIL setting %0d: %0d DEC commands", g, n_dec[g]); end
      for (int c = 0; c < NUM_CORES; c++) begin
        checks += int'(drv_chk[g][c]);
        failures += int'(drv_fail[g][c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
