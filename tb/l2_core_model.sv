// l2_core_model: traffic source standing in for one core and its L1 caches
// in the top-level testbenches (not part of the design). It issues one
// L1-line read or write at a time to the shared L2 and checks every read
// against its own shadow copy of the lines it wrote; lines it never wrote
// must read as the memory model's address pattern (same formula as
// mem_model.init_line). Hits must answer in exactly HIT_LAT cycles.
// Two access patterns:
//   pat_i = 0 "hot": one line per set, visited set by set; after warm-up
//            every access hits the core's MRU line (high locality, small D);
//   pat_i = 1 "cyclic": k_i lines of one set in turn, four rounds per set;
//            when k_i equals the core's ways, every access after the first
//            round hits its LRU line (low locality, large D).
// Each core uses its own range of tags, so the two cores share no data.
module l2_core_model #(
  parameter int unsigned CORE    = 0,
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned PB      = 256,
  parameter int unsigned LB      = 512,
  parameter int unsigned SETS    = 512,
  parameter int unsigned HIT_LAT = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en_i,
  input  logic              pat_i,
  input  int unsigned       k_i,
  output logic              req_valid_o,
  input  logic              req_ready_i,
  output logic              req_we_o,
  output logic [ADDR_W-1:0] req_addr_o,
  output logic [PB-1:0]     req_wdata_o,
  input  logic              rsp_valid_i,
  input  logic              rsp_hit_i,
  input  logic [PB-1:0]     rsp_rdata_i,
  output int unsigned       n_acc,
  output int unsigned       n_hit,
  output int unsigned       checks,
  output int unsigned       failures
);

  localparam int unsigned OFF  = $clog2(LB / 8);
  localparam int unsigned IDXW = $clog2(SETS);
  localparam int unsigned LAW  = ADDR_W - OFF;
  localparam int unsigned SUBS = LB / PB;

  logic [LB-1:0] shadow [logic [LAW-1:0]];

  function automatic logic [LB-1:0] init_line(input logic [LAW-1:0] a);
    logic [LB-1:0] l;
    for (int i = 0; i < int'(LB / 32); i++)
      l[i * 32 +: 32] = 32'(a) * 32'h9E3779B1 + 32'(i) * 32'h7F4A7C15;
    return l;
  endfunction

  int unsigned n;

  initial begin
    req_valid_o = 1'b0; req_we_o = 1'b0; req_addr_o = '0; req_wdata_o = '0;
    n = 0; n_acc = 0; n_hit = 0; checks = 0; failures = 0;
    @(posedge rst_n);
    forever begin
      @(posedge clk); #1;
      if (en_i) begin
        automatic int unsigned k = (k_i == 0) ? 1 : k_i;
        automatic int unsigned set, tag, sub, cyc;
        automatic logic [LAW-1:0] line;
        automatic logic [LB-1:0] l;
        automatic logic we = ($urandom_range(0, 3) == 0);
        automatic logic [PB-1:0] wd;
        if (pat_i == 1'b0) begin
          set = n % SETS; tag = 0;
        end else begin
          set = (n / (4 * k)) % SETS; tag = 1 + n % k;
        end
        tag += (CORE + 1) * 4096;
        sub  = $urandom_range(0, SUBS - 1);
        line = {(LAW - IDXW)'(tag), IDXW'(set)};
        for (int i = 0; i < int'(PB / 32); i++) wd[i * 32 +: 32] = $urandom;
        req_valid_o = 1'b1; req_we_o = we;
        req_addr_o  = {line, OFF'(sub * PB / 8)};
        req_wdata_o = wd;
        do @(posedge clk); while (!req_ready_i);
        #1 req_valid_o = 1'b0;
        cyc = 1;
        while (!rsp_valid_i) begin @(posedge clk); #1 cyc++; end
        l = shadow.exists(line) ? shadow[line] : init_line(line);
        if (!we) begin
          checks++;
          if (rsp_rdata_i != l[sub * PB +: PB]) begin
            failures++;
            $display("FAIL core %0d read line %h", CORE, line);
          end
        end else begin
          l[sub * PB +: PB] = wd;
          shadow[line] = l;
        end
        if (rsp_hit_i) begin
          n_hit++;
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
