// tb_partition_ctrl_sizes: the control circuit at the four sampling-counter
// sizes N = 8, 12, 16 and 20 (intervals of 256 to about a million
// accesses), each with 16 fraction bits in D and the 3-bit asymmetric
// state machines, under the three threshold settings (0.1, 0.5),
// (0.01, 0.05) and (0.001, 0.005). For random MRU/LRU counts that add up
// to at most one interval, it checks D of both cores against 64-bit integer
// division, the allocation move against D0 versus D1, the threshold
// requests, and the arrival of the result N + 17 + 2 edges after the edge that
// takes the start pulse.
// Counts near the corners (zero MRU hits, equal counts, a full interval)
// are mixed in on purpose.
module tb_partition_ctrl_sizes;
  import wac_pkg::*;
  localparam int FB = 16;
  localparam int NSZ = 4;
  localparam int SIZES [NSZ] = '{8, 12, 16, 20};
  localparam longint TH1 [3] = '{6554, 655, 66};
  localparam longint TH2 [3] = '{32768, 3277, 328};
  localparam int TRIALS = 300;

  logic clk, rst_n;
  initial begin clk = 1'b0; rst_n = 1'b1; end
  initial begin
    #1 rst_n = 1'b0;          // a falling edge for the asynchronous reset
    #20 rst_n = 1'b1;
  end
  always #5 clk = ~clk;

  int chk [NSZ], fail [NSZ];
  logic fin [NSZ];

  for (genvar g = 0; g < NSZ; g++) begin : g_sz
    localparam int N = SIZES[g], CW = N + 1, DW = CW + FB;
    logic start, busy, done;
    logic [CW-1:0] mru [NUM_CORES];
    logic [CW-1:0] lru [NUM_CORES];
    logic [DW-1:0] t1, t2;
    move_e   mv;
    resize_e cmd [NUM_CORES];
    resize_e rq  [NUM_CORES];
    logic [DW-1:0] d [NUM_CORES];
    logic [2:0] st [NUM_CORES];

    partition_ctrl #(.SAMPLE_BITS(N), .FRAC_BITS(FB)) dut (
      .clk, .rst_n, .start_i(start), .mru_cnt_i(mru), .lru_cnt_i(lru), .t1_i(t1), .t2_i(t2),
      .busy_o(busy), .done_o(done), .move_o(mv), .cmd_o(cmd), .req_o(rq), .d_o(d), .state_o(st));

    function automatic longint exp_d(longint l, longint m);
      if (m == 0) return (l == 0) ? 0 : (longint'(1) << DW) - 1;
      return (l << FB) / m;
    endfunction

    function automatic longint rnd_cnt(longint lim);
      case ($urandom_range(0, 5))
        0: return 0;
        1: return lim;
        2: return (lim < 3) ? lim : longint'($urandom_range(0, 3));
        default: return longint'($urandom) % (lim + 1);
      endcase
    endfunction

    initial begin
      automatic longint full = longint'(1) << N;
      chk[g] = 0; fail[g] = 0; fin[g] = 1'b0;
      start = 1'b0; t1 = '0; t2 = '0;
      for (int c = 0; c < NUM_CORES; c++) begin mru[c] = '0; lru[c] = '0; end
      @(posedge rst_n);
      repeat (2) @(posedge clk); #1;
      for (int n = 0; n < TRIALS; n++) begin
        automatic int ts = n % 3;
        automatic longint ed [NUM_CORES];
        automatic int cyc = 0;
        automatic longint left = full;
        for (int c = 0; c < NUM_CORES; c++) begin
          automatic longint m = rnd_cnt(left);
          automatic longint l;
          left -= m;
          l = rnd_cnt(left);
          left -= l;
          if (n % 7 == 0 && c == 1) begin m = longint'(mru[0]); l = longint'(lru[0]); end   // equal D
          mru[c] = CW'(m);
          lru[c] = CW'(l);
          ed[c]  = exp_d(l, m);
        end
        t1 = DW'(TH1[ts]);
        t2 = DW'(TH2[ts]);
        start = 1'b1;
        @(posedge clk); #1 start = 1'b0;
        cyc = 0;
        while (!done) begin @(posedge clk); #1 cyc++; end
        chk[g] += 1;
        if (cyc != DW + 2) begin fail[g]++; $display("FAIL N=%0d latency %0d", N, cyc); end
        for (int c = 0; c < NUM_CORES; c++) begin
          automatic resize_e er = (ed[c] < TH1[ts]) ? RS_DEC : (ed[c] > TH2[ts]) ? RS_INC : RS_KEEP;
          chk[g] += 2;
          if (longint'(d[c]) != ed[c]) begin
            fail[g]++;
            $display("FAIL N=%0d core %0d D=%0d expected %0d (lru %0d mru %0d)", N, c, d[c], ed[c], lru[c], mru[c]);
          end
          if (rq[c] != er) begin fail[g]++; $display("FAIL N=%0d core %0d request %0d expected %0d", N, c, rq[c], er); end
        end
        chk[g] += 1;
        if (mv != ((ed[0] > ed[1]) ? MV_TO_C0 : (ed[0] < ed[1]) ? MV_TO_C1 : MV_NONE)) begin
          fail[g]++; $display("FAIL N=%0d move %0d", N, mv);
        end
        repeat (2) @(posedge clk); #1;
      end
      fin[g] = 1'b1;
    end
  end

  initial begin
    automatic int checks = 0, failures = 0;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    for (int g = 0; g < NSZ; g++) begin
      $display("N=%0d: checks=%0d failures=%0d", SIZES[g], chk[g], fail[g]);
      checks += chk[g];
      failures += fail[g];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1] + chk[2] + chk[3], fail[0] + fail[1] + fail[2] + fail[3] + 1);
    $finish;
  end
endmodule
