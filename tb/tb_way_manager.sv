// tb_way_manager: the way manager with 8 ways and a minimum of 2 powered
// ways per core. Random decisions are fed in; a flush responder answers
// each flush request after a random delay. A reference model in this file
// predicts, for every decision, how many ways each core owns and has
// powered afterwards (allocation first, skipped when both cores have
// powered-off ways or the donor is at its minimum; then INC/DEC of core 0
// and core 1). It also checks that a way is flushed before it is switched
// off or handed to the other core while powered, that a way being flushed is not offered for replacement, that the
// replacement masks are the owned and powered ways, and that leaving the
// partitioned mode powers every way up.
module tb_way_manager;
  import wac_pkg::*;
  localparam int W = 8, MINW = 2, WIW = 3;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic part_en, dv, busy, freq, fdone;
  move_e mv;
  resize_e cmd [NUM_CORES];
  logic [WIW-1:0] fway;
  logic [W-1:0] on, owner;
  logic [W-1:0] mask [NUM_CORES];
  logic ev_move, ev_skip, ev_on, ev_off;

  way_manager #(.WAYS(W), .MIN_WAYS(MINW)) dut (
    .clk, .rst_n, .part_en_i(part_en), .dec_valid_i(dv), .move_i(mv), .cmd_i(cmd),
    .busy_o(busy), .flush_req_o(freq), .flush_way_o(fway), .flush_done_i(fdone),
    .way_on_o(on), .way_owner_o(owner), .repl_mask_o(mask),
    .ev_move_o(ev_move), .ev_move_skip_o(ev_skip), .ev_on_o(ev_on), .ev_off_o(ev_off));

  function automatic int cnt(logic [W-1:0] v);
    int k = 0;
    for (int i = 0; i < W; i++) k += int'(v[i]);
    return k;
  endfunction

  // flush responder: answers after a random delay, checks the way is
  // powered and excluded from both masks while it is being flushed
  int flushes = 0;
  initial begin
    fdone = 1'b0;
    forever begin
      @(posedge clk);
      if (freq && !fdone) begin
        automatic logic [WIW-1:0] fw = fway;
        automatic logic fo = owner[fway];
        repeat ($urandom_range(1, 6)) begin
          @(posedge clk); #1;
          checks++;
          if (!on[fway] || mask[0][fway] || mask[1][fway]) begin
            failures++; $display("FAIL way %0d under flush offered or off", fway);
          end
        end
        fdone = 1'b1; flushes++;
        do @(posedge clk); while (freq);
        #1 fdone = 1'b0;
        checks++;
        if (on[fw] && owner[fw] == fo) begin failures++; $display("FAIL way %0d neither off nor handed over after flush", fw); end
      end
    end
  end

  // reference counts: owned (a) and powered (p) ways per core
  int a [2], p [2];
  int moves = 0, skips = 0, ons = 0, offs = 0, mv_flushes = 0;

  task automatic decide(move_e m, resize_e c0, resize_e c1);
    mv = m; cmd[0] = c0; cmd[1] = c1; dv = 1'b1;
    @(posedge clk); #1 dv = 1'b0;
    // model
    if (m != MV_NONE) begin
      automatic int dn = (m == MV_TO_C0) ? 1 : 0;
      automatic int rc = 1 - dn;
      if (!((a[0] > p[0]) && (a[1] > p[1])) && a[dn] > MINW) begin
        if (a[dn] == p[dn]) begin p[dn]--; p[rc]++; mv_flushes++; end   // hands over a powered way, flushed first
        a[dn]--; a[rc]++;
        moves++;
      end else skips++;
    end
    for (int c = 0; c < 2; c++) begin
      automatic resize_e cc = (c == 0) ? c0 : c1;
      if (cc == RS_INC && a[c] > p[c]) begin p[c]++; ons++; end
      else if (cc == RS_DEC && p[c] > MINW) begin p[c]--; offs++; end
    end
    while (busy) begin @(posedge clk); #1; end
    for (int c = 0; c < 2; c++) begin
      automatic logic [W-1:0] own = (c == 0) ? ~owner : owner;
      checks += 3;
      if (cnt(own) != a[c])      begin failures++; $display("FAIL core %0d owns %0d exp %0d", c, cnt(own), a[c]); end
      if (cnt(own & on) != p[c]) begin failures++; $display("FAIL core %0d powered %0d exp %0d", c, cnt(own & on), p[c]); end
      if (mask[c] != (own & on)) begin failures++; $display("FAIL mask core %0d", c); end
    end
  endtask

  initial begin
    part_en = 1'b1; dv = 1'b0; mv = MV_NONE; cmd[0] = RS_KEEP; cmd[1] = RS_KEEP;
    a = '{W / 2, W / 2}; p = '{W / 2, W / 2};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (on != '1 || cnt(owner) != W / 2) begin failures++; $display("FAIL reset state"); end
    // directed: allocation while nobody has off ways, then power down core 1
    decide(MV_TO_C0, RS_KEEP, RS_KEEP);
    decide(MV_NONE, RS_KEEP, RS_DEC);
    decide(MV_NONE, RS_DEC, RS_KEEP);
    decide(MV_TO_C1, RS_KEEP, RS_KEEP);      // both have off ways: skipped
    decide(MV_NONE, RS_INC, RS_INC);
    for (int n = 0; n < 400; n++) begin
      automatic move_e m = move_e'($urandom_range(0, 2));
      automatic resize_e c0 = resize_e'($urandom_range(0, 2));
      automatic resize_e c1 = resize_e'($urandom_range(0, 2));
      decide(m, c0, c1);
    end
    // mode switch: conventional shared cache powers every way and opens all masks
    part_en = 1'b0;
    repeat (2) @(posedge clk); #1;
    checks += 3;
    if (on != '1) begin failures++; $display("FAIL not all on in shared mode"); end
    if (mask[0] != '1 || mask[1] != '1) begin failures++; $display("FAIL shared masks"); end
    mv = MV_TO_C0; cmd[0] = RS_DEC; cmd[1] = RS_DEC; dv = 1'b1;   // ignored in shared mode
    @(posedge clk); #1 dv = 1'b0;
    repeat (10) @(posedge clk); #1;
    if (on != '1 || busy || freq) begin failures++; $display("FAIL decision acted on in shared mode"); end
    checks += 5;
    if (moves == 0) begin failures++; $display("FAIL no move"); end
    if (skips == 0) begin failures++; $display("FAIL no skip"); end
    if (ons == 0)   begin failures++; $display("FAIL no power-up"); end
    if (offs == 0)  begin failures++; $display("FAIL no power-down"); end
    if (flushes != offs + mv_flushes) begin failures++; $display("FAIL flushes %0d offs %0d move flushes %0d", flushes, offs, mv_flushes); end
    $display("moves=%0d (flushed %0d) skips=%0d ons=%0d offs=%0d", moves, mv_flushes, skips, ons, offs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
