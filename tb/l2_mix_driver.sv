// l2_mix_driver: read-only traffic source standing in for one core in the
// threshold test (not part of the design). It issues one L1-line read at a
// time and waits for the answer.
//   MIX = 0: "hot" pattern, one line in every set, visited set by set; once
//            loaded every access hits the core's MRU line (D = 0).
//   MIX = M > 0: every M-th access goes to a small group of CYC_SETS "deep"
//            sets in which the core cycles through k_i lines (k_i = number
//            of ways it can use), so each such access hits its LRU line;
//            the other accesses follow the hot pattern on the remaining
//            sets. Once warm, D = 1 / (M - 1).
// Hits must answer in exactly HIT_LAT cycles.
module l2_mix_driver #(
  parameter int unsigned CORE     = 0,
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned PB       = 256,
  parameter int unsigned LB       = 512,
  parameter int unsigned SETS     = 64,
  parameter int unsigned CYC_SETS = 4,
  parameter int unsigned MIX      = 32,
  parameter int unsigned HIT_LAT  = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_i,
  input  int unsigned       k_i,
  output logic              req_valid_o,
  input  logic              req_ready_i,
  output logic              req_we_o,
  output logic [ADDR_W-1:0] req_addr_o,
  output logic [PB-1:0]     req_wdata_o,
  input  logic              rsp_valid_i,
  input  logic              rsp_hit_i,
  output int unsigned       n_acc,
  output int unsigned       checks,
  output int unsigned       failures
);
  localparam int unsigned OFF  = $clog2(LB / 8);
  localparam int unsigned IDXW = $clog2(SETS);
  localparam int unsigned LAW  = ADDR_W - OFF;
  localparam int unsigned HOT_SETS = (MIX == 0) ? SETS : SETS - CYC_SETS;

  int unsigned n, m;

  initial begin
    req_valid_o = 1'b0; req_we_o = 1'b0; req_addr_o = '0; req_wdata_o = '0;
    n = 0; m = 0; n_acc = 0; checks = 0; failures = 0;
    @(posedge rst_n);
    forever begin
      @(posedge clk); #1;
      if (en_i) begin
        automatic int unsigned k = (k_i == 0) ? 1 : k_i;
        automatic int unsigned set, tag, cyc;
        automatic logic [LAW-1:0] line;
        if (MIX != 0 && (n % MIX) == MIX - 1) begin
          set = HOT_SETS + m % CYC_SETS;
          tag = 1 + (m / CYC_SETS) % k;
          m++;
        end else begin
          set = n % HOT_SETS;
          tag = 0;
        end
        tag += (CORE + 1) * 4096;
        line = {(LAW - IDXW)'(tag), IDXW'(set)};
        req_valid_o = 1'b1;
        req_addr_o  = {line, OFF'(0)};
        do @(posedge clk); while (!req_ready_i);
        #1 req_valid_o = 1'b0;
        cyc = 1;
        while (!rsp_valid_i) begin @(posedge clk); #1 cyc++; end
        if (rsp_hit_i) begin
          checks++;
          if (cyc != HIT_LAT) begin
            failures++;
            $display("FAIL core %0d hit latency %0d", CORE, cyc);
          end
        end
        n_acc++;
        n++;
      end
    end
  end
endmodule
