// tb_partition_ctrl: the control circuit at a small size (4-bit sampling
// counter, 8 fraction bits, 3-bit asymmetric state machines). For random
// MRU/LRU counts and thresholds it checks D of both cores against integer
// arithmetic, the allocation move against the comparison of D0 and D1, the
// local requests against T1/T2, and the issued commands against a
// reference model of the asymmetric state machine that lives in this file.
// The decision must arrive QW + 2 edges after the start edge.
module tb_partition_ctrl;
  import wac_pkg::*;
  localparam int N = 4, FB = 8, CW = N + 1, DW = CW + FB;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic start, busy, done;
  logic [CW-1:0] mru [NUM_CORES];
  logic [CW-1:0] lru [NUM_CORES];
  logic [DW-1:0] t1, t2;
  move_e   mv;
  resize_e cmd [NUM_CORES];
  resize_e rq  [NUM_CORES];
  logic [DW-1:0] d [NUM_CORES];
  logic [2:0] st [NUM_CORES];

  partition_ctrl #(.SAMPLE_BITS(N), .FRAC_BITS(FB), .SM_BITS(3), .SM_ASYM(1'b1)) dut (
    .clk, .rst_n, .start_i(start), .mru_cnt_i(mru), .lru_cnt_i(lru), .t1_i(t1), .t2_i(t2),
    .busy_o(busy), .done_o(done), .move_o(mv), .cmd_o(cmd), .req_o(rq), .d_o(d), .state_o(st));

  int unsigned ref_st [2];
  int cyc;

  function automatic longint unsigned dval(int unsigned l, int unsigned m);
    if (m == 0) return (l == 0) ? 0 : (64'd1 << DW) - 1;
    return (longint'(l) << FB) / longint'(m);
  endfunction

  initial begin
    start = 0; t1 = '0; t2 = '0;
    for (int c = 0; c < 2; c++) begin mru[c] = '0; lru[c] = '0; end
    ref_st = '{0, 0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      automatic longint unsigned ed [2];
      automatic resize_e er [2], ec [2];
      automatic move_e em;
      for (int c = 0; c < 2; c++) begin
        mru[c] = CW'($urandom_range(0, 16));
        lru[c] = CW'($urandom_range(0, 16));
      end
      if ($urandom_range(0, 4) == 0) begin mru[1] = mru[0]; lru[1] = lru[0]; end
      t1 = DW'($urandom_range(0, 300));
      t2 = t1 + DW'($urandom_range(0, 300));
      start = 1'b1;
      @(posedge clk); #1 start = 1'b0;
      cyc = 1;
      while (!done) begin @(posedge clk); #1 cyc++; end
      cyc--;
      checks++;
      if (cyc != DW + 2) begin failures++; $display("FAIL latency %0d", cyc); end
      for (int c = 0; c < 2; c++) begin
        ed[c] = dval(lru[c], mru[c]);
        if (ed[c] < longint'(t1))      er[c] = RS_DEC;
        else if (ed[c] > longint'(t2)) er[c] = RS_INC;
        else                           er[c] = RS_KEEP;
        // asymmetric 3-bit state machine
        ec[c] = RS_KEEP;
        if (er[c] == RS_INC) begin ec[c] = RS_INC; ref_st[c] = 0; end
        else if (er[c] == RS_DEC) begin
          if (ref_st[c] >= 6) begin ec[c] = RS_DEC; ref_st[c] = 7; end
          else ref_st[c]++;
        end
        checks += 4;
        if (d[c] != DW'(ed[c])) begin failures++; $display("FAIL d[%0d]=%0d exp %0d", c, d[c], ed[c]); end
        if (rq[c] != er[c])     begin failures++; $display("FAIL req[%0d]", c); end
        if (cmd[c] != ec[c])    begin failures++; $display("FAIL cmd[%0d]=%0d exp %0d", c, cmd[c], ec[c]); end
        if (st[c] != 3'(ref_st[c])) begin failures++; $display("FAIL state[%0d]", c); end
      end
      em = (ed[0] > ed[1]) ? MV_TO_C0 : (ed[0] < ed[1]) ? MV_TO_C1 : MV_NONE;
      checks++;
      if (mv != em) begin failures++; $display("FAIL move %0d exp %0d", mv, em); end
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
