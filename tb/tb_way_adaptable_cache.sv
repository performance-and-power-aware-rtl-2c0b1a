// tb_way_adaptable_cache: the cache at 4 ways x 4 sets (64-byte lines,
// 32-byte port, 14-cycle hit) against a 100-cycle memory model.
//   Phase 1 (shared, all ways in both masks): random reads and writes of
//     8 lines per set by both cores. A true-LRU stack per set, kept here,
//     predicts hit or miss, and whether the hit is on the MRU or LRU line;
//     read data must match a shadow copy of every line; hits must answer
//     in exactly 14 cycles.
//   Phase 2: every way is flushed in turn; afterwards main memory must hold
//     the shadow contents of every line ever written, and a re-read misses.
//   Phase 3 (partitioned: core 0 owns ways 0-1, core 1 ways 2-3, disjoint
//     address ranges): the model keeps a 2-deep LRU stack per core and set;
//     hits, MRU/LRU flags, data and the confinement of each core's lines to
//     its own ways are checked.
module tb_way_adaptable_cache;
  import wac_pkg::*;
  localparam int W = 4, S = 4, LBY = 64, PBY = 32, AW = 32, HL = 14;
  localparam int LB = LBY * 8, PB = PBY * 8, LAW = AW - 6;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic req_valid, req_ready, req_core, req_we;
  logic [AW-1:0] req_addr;
  logic [PB-1:0] req_wdata, rsp_rdata;
  logic rsp_valid, rsp_core, rsp_hit;
  logic [W-1:0] way_on;
  logic [W-1:0] mask [NUM_CORES];
  logic freq, fdone;
  logic [1:0] fway;
  logic acc_valid, acc_core, acc_mru, acc_lru;
  logic m_valid, m_ready, m_we, m_rvalid;
  logic [LAW-1:0] m_addr;
  logic [LB-1:0] m_wdata, m_rdata;

  way_adaptable_cache #(.WAYS(W), .SETS(S), .LINE_BYTES(LBY), .PORT_BYTES(PBY),
                        .ADDR_W(AW), .HIT_LAT(HL)) dut (
    .clk, .rst_n,
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_core_i(req_core),
    .req_we_i(req_we), .req_addr_i(req_addr), .req_wdata_i(req_wdata),
    .rsp_valid_o(rsp_valid), .rsp_core_o(rsp_core), .rsp_hit_o(rsp_hit), .rsp_rdata_o(rsp_rdata),
    .way_on_i(way_on), .repl_mask_i(mask),
    .flush_req_i(freq), .flush_way_i(fway), .flush_done_o(fdone),
    .acc_valid_o(acc_valid), .acc_core_o(acc_core), .acc_mru_o(acc_mru), .acc_lru_o(acc_lru),
    .mem_req_valid_o(m_valid), .mem_req_ready_i(m_ready), .mem_req_we_o(m_we),
    .mem_req_addr_o(m_addr), .mem_req_wdata_o(m_wdata),
    .mem_rsp_valid_i(m_rvalid), .mem_rsp_rdata_i(m_rdata));

  mem_model #(.LAW(LAW), .LB(LB), .LAT(100)) u_mem (
    .clk, .rst_n, .req_valid_i(m_valid), .req_ready_o(m_ready), .req_we_i(m_we),
    .req_addr_i(m_addr), .req_wdata_i(m_wdata), .rsp_valid_o(m_rvalid), .rsp_rdata_o(m_rdata));

  // shadow of the data every line should hold
  logic [LB-1:0] shadow [logic [LAW-1:0]];
  function automatic logic [LB-1:0] expect_line(logic [LAW-1:0] a);
    return shadow.exists(a) ? shadow[a] : u_mem.init_line(a);
  endfunction

  // stats seen on the monitor port during the last access
  logic seen_acc, seen_mru, seen_lru;
  always @(posedge clk) if (acc_valid) begin
    seen_acc <= 1'b1; seen_mru <= acc_mru; seen_lru <= acc_lru;
  end

  int hits = 0, misses = 0, mrus = 0, lrus = 0;

  // one access; checks data, latency, hit and MRU/LRU against the caller's
  // predictions (exp_hit < 0: do not check hit/flags)
  task automatic access(input logic core, input logic we, input logic [LAW-1:0] line,
                        input logic sub, input int exp_hit, input int exp_mru, input int exp_lru);
    automatic logic [PB-1:0] wd = {8{32'($urandom)}};
    automatic int cyc = 0;
    automatic logic [LB-1:0] l = expect_line(line);
    req_valid = 1'b1; req_core = core; req_we = we;
    req_addr = {line, sub, 5'b0}; req_wdata = wd;
    seen_acc = 1'b0;
    do @(posedge clk); while (!req_ready);
    #1 req_valid = 1'b0;
    cyc = 1;
    while (!rsp_valid) begin @(posedge clk); #1 cyc++; end
    // rsp_valid is now visible; it is sampled at the next edge
    checks += 2;
    if (rsp_core != core) begin failures++; $display("FAIL rsp core"); end
    if (!we && rsp_rdata != l[sub * PB +: PB]) begin
      failures++; $display("FAIL data line %h sub %0d", line, sub);
    end
    if (exp_hit >= 0) begin
      checks += 3;
      if (rsp_hit != 1'(exp_hit)) begin failures++; $display("FAIL hit %0d exp %0d line %h", rsp_hit, exp_hit, line); end
      if (seen_mru != 1'(exp_mru)) begin failures++; $display("FAIL mru %0d exp %0d line %h", seen_mru, exp_mru, line); end
      if (seen_lru != 1'(exp_lru)) begin failures++; $display("FAIL lru %0d exp %0d line %h", seen_lru, exp_lru, line); end
    end
    if (rsp_hit) begin
      hits++;
      checks++;
      if (cyc != HL) begin failures++; $display("FAIL hit latency %0d", cyc); end
    end else misses++;
    if (seen_mru) mrus++;
    if (seen_lru) lrus++;
    if (we) begin
      l[sub * PB +: PB] = wd;
      shadow[line] = l;
    end
    @(posedge clk); #1;
  endtask

  // true-LRU stacks: stk[key][0] is the MRU line
  logic [LAW-1:0] stk [int][$];
  task automatic model_access(input int key, input int depth, input logic [LAW-1:0] line,
                              output int h, output int m, output int lr);
    automatic int pos = -1;
    automatic logic [LAW-1:0] q [$];
    if (stk.exists(key)) q = stk[key];
    foreach (q[i]) if (q[i] == line) pos = i;
    h = int'(pos >= 0); m = int'(pos == 0); lr = int'(pos == depth - 1);
    if (pos >= 0) q.delete(pos);
    q.push_front(line);
    if (q.size() > depth) void'(q.pop_back());
    stk[key] = q;
  endtask

  task automatic flush(input int w);
    freq = 1'b1; fway = 2'(w);
    do @(posedge clk); while (!fdone);
    #1 freq = 1'b0;
    do @(posedge clk); while (fdone);
    #1;
  endtask

  initial begin
    req_valid = 0; req_core = 0; req_we = 0; req_addr = '0; req_wdata = '0;
    freq = 0; fway = '0; way_on = '1; mask[0] = '1; mask[1] = '1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // phase 1: shared
    for (int n = 0; n < 600; n++) begin
      automatic int set = $urandom_range(0, S - 1);
      automatic logic [LAW-1:0] line = {24'($urandom_range(0, 7)), 2'(set)};
      automatic int h, m, lr;
      model_access(set, W, line, h, m, lr);
      access(1'($urandom_range(0, 1)), 1'($urandom_range(0, 1)), line,
             1'($urandom_range(0, 1)), h, m, lr);
    end
    // phase 2: flush every way, memory must then hold every written line
    for (int w = 0; w < W; w++) flush(w);
    foreach (shadow[a]) begin
      checks++;
      if (u_mem.peek(a) != shadow[a]) begin failures++; $display("FAIL memory line %h after flush", a); end
    end
    stk.delete();
    for (int t = 0; t < 4; t++) begin
      automatic logic [LAW-1:0] line = {24'(t), 2'(1)};
      automatic int h, m, lr;
      model_access(1, W, line, h, m, lr);
      access(1'b0, 1'b0, line, 1'b0, 0, 0, 0);
    end
    // phase 3: partitioned
    for (int w = 0; w < W; w++) flush(w);
    stk.delete();
    mask[0] = 4'b0011; mask[1] = 4'b1100;
    for (int n = 0; n < 600; n++) begin
      automatic int set = $urandom_range(0, S - 1);
      automatic logic core = 1'($urandom_range(0, 1));
      automatic logic [LAW-1:0] line = {24'($urandom_range(0, 3) + (core ? 100 : 0)), 2'(set)};
      automatic int h, m, lr;
      model_access(set * 2 + int'(core), 2, line, h, m, lr);
      access(core, 1'($urandom_range(0, 1)), line, 1'($urandom_range(0, 1)), h, m, lr);
    end
    // confinement: core 0 lines only in ways 0-1, core 1 lines in 2-3
    for (int s = 0; s < S; s++)
      for (int w = 0; w < W; w++)
        if (dut.val_q[s][w]) begin
          checks++;
          if ((dut.tag_q[s][w] >= 100) != (w >= 2)) begin
            failures++; $display("FAIL line of wrong core in set %0d way %0d", s, w);
          end
        end
    checks += 4;
    if (hits == 0 || misses == 0) begin failures++; $display("FAIL no hits or misses"); end
    if (mrus == 0) begin failures++; $display("FAIL no MRU hit"); end
    if (lrus == 0) begin failures++; $display("FAIL no LRU hit"); end
    if (u_mem.n_writes == 0) begin failures++; $display("FAIL no write-back"); end
    $display("hits=%0d misses=%0d mru=%0d lru=%0d wb=%0d", hits, misses, mrus, lrus, u_mem.n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
