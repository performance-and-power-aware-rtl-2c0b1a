// tb_d_divider: D = (LRUcount << 16) / MRUcount at the default width
// (17-bit counts, 16 fraction bits). Random and corner operands, including
// a zero divisor and 0/0, checked against 64-bit arithmetic; the latency
// from the start edge to done must be QW + 1 = 34 edges.
module tb_d_divider;
  localparam int CW = 17, FB = 16, QW = CW + FB;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          start, busy, done;
  logic [CW-1:0] lru, mru;
  logic [QW-1:0] d;
  longint unsigned exp;
  int cyc;

  d_divider #(.CW(CW), .FRAC_BITS(FB)) dut (
    .clk, .rst_n, .start_i(start), .lru_i(lru), .mru_i(mru),
    .busy_o(busy), .done_o(done), .d_o(d));

  task automatic run(input logic [CW-1:0] l, input logic [CW-1:0] m);
    lru = l; mru = m; start = 1'b1;
    @(posedge clk); #1 start = 1'b0;
    lru = CW'($urandom); mru = CW'($urandom);   // operands are taken at start
    cyc = 1;
    while (!done) begin @(posedge clk); #1 cyc++; end
    cyc--;
    if (m == 0) exp = (l == 0) ? 0 : (64'd1 << QW) - 1;
    else        exp = (longint'(l) << FB) / longint'(m);
    checks += 2;
    if (d != QW'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d/%0d got %0d exp %0d", l, m, d, exp);
    end
    if (cyc != QW + 1) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d", cyc);
    end
  endtask

  initial begin
    start = 1'b0; lru = '0; mru = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run(0, 0); run(5, 0); run(0, 7); run(1, 1); run(1, 65536); run(65536, 1);
    run(131071, 131071); run(3, 1000); run(100, 99999);
    for (int n = 0; n < 300; n++) begin
      automatic logic [CW-1:0] l = CW'($urandom_range(0, 131071));
      automatic logic [CW-1:0] m = CW'($urandom_range(0, 131071));
      if ($urandom_range(0, 2) == 0) l = CW'($urandom_range(0, 200));
      run(l, m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
