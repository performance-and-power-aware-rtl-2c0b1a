// tb_access_monitor: random access stream (with idle cycles) into a monitor
// with a 2^5-access interval; a reference model counts MRU and LRU hits per
// core. At every interval end the monitor must pulse sample_done exactly
// once, one edge after the 32nd access, with the reference counts.
module tb_access_monitor;
  import wac_pkg::*;
  localparam int N = 5, CW = N + 1;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic acc_v, acc_c, acc_m, acc_l, done;
  logic [CW-1:0] mru [NUM_CORES];
  logic [CW-1:0] lru [NUM_CORES];

  access_monitor #(.SAMPLE_BITS(N)) dut (
    .clk, .rst_n, .acc_valid_i(acc_v), .acc_core_i(acc_c), .acc_mru_i(acc_m),
    .acc_lru_i(acc_l), .mru_cnt_o(mru), .lru_cnt_o(lru), .sample_done_o(done));

  int rm [2], rl [2], em [2], el [2];
  int seen, intervals, expect_done;

  initial begin
    acc_v = 0; acc_c = 0; acc_m = 0; acc_l = 0;
    rm = '{0, 0}; rl = '{0, 0}; seen = 0; intervals = 0; expect_done = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      acc_v = ($urandom_range(0, 3) != 0);
      acc_c = 1'($urandom_range(0, 1));
      case ($urandom_range(0, 2))
        0: begin acc_m = 1; acc_l = 0; end
        1: begin acc_m = 0; acc_l = 1; end
        default: begin acc_m = 0; acc_l = 0; end
      endcase
      @(posedge clk);
      // check the pulse caused by the previous edge
      checks++;
      if (done != (expect_done != 0)) begin failures++; $display("FAIL done=%0d at n=%0d", done, n); end
      if (expect_done) begin
        for (int c = 0; c < 2; c++) begin
          checks += 2;
          if (mru[c] != CW'(em[c])) begin failures++; $display("FAIL mru[%0d]=%0d exp %0d", c, mru[c], em[c]); end
          if (lru[c] != CW'(el[c])) begin failures++; $display("FAIL lru[%0d]=%0d exp %0d", c, lru[c], el[c]); end
        end
        intervals++;
      end
      expect_done = 0;
      if (acc_v) begin
        if (acc_m) rm[acc_c]++;
        if (acc_l) rl[acc_c]++;
        seen++;
        if (seen == (1 << N)) begin
          em = rm; el = rl; rm = '{0, 0}; rl = '{0, 0}; seen = 0; expect_done = 1;
        end
      end
      #1;
    end
    checks++;
    if (intervals < 50) begin failures++; $display("FAIL only %0d intervals", intervals); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
