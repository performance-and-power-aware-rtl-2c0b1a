// access_monitor: access sampling for the cache requirement metric.
//
// Every L2 lookup is reported on the acc_* inputs with the requesting core
// and whether it hit that core's MRU line or its LRU line (stack position
// 1 or W of the core's own LRU stack). The monitor counts, per core, the MRU
// hits and the LRU hits, and counts all L2 accesses of both cores in an
// N-bit sampling counter. When 2^N accesses have been seen, the interval
// ends: the per-core counts, including the closing access, are copied to
// the *_cnt_o outputs, sample_done_o pulses for one cycle, and counting
// restarts from zero. The counts are N+1 bits wide so that a full interval
// of hits by one core cannot overflow (a width choice of this
// implementation).
//
// Timing: one access per clock at most; sample_done_o and the new counts
// appear the edge after the 2^N-th access. The outputs hold until the next
// interval ends.
module access_monitor
  import wac_pkg::*;
#(
  parameter int unsigned SAMPLE_BITS = 16,          // N: interval = 2^N accesses
  localparam int unsigned CW         = SAMPLE_BITS + 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 acc_valid_i,
  input  logic                 acc_core_i,
  input  logic                 acc_mru_i,
  input  logic                 acc_lru_i,
  output logic [CW-1:0]        mru_cnt_o [NUM_CORES],
  output logic [CW-1:0]        lru_cnt_o [NUM_CORES],
  output logic                 sample_done_o
);

  logic [SAMPLE_BITS-1:0] samp_q;
  logic [CW-1:0]          mru_q [NUM_CORES];
  logic [CW-1:0]          lru_q [NUM_CORES];
  logic [CW-1:0]          mru_n [NUM_CORES];
  logic [CW-1:0]          lru_n [NUM_CORES];
  logic                   last;

  assign last = acc_valid_i && (samp_q == {SAMPLE_BITS{1'b1}});

  always_comb begin
    for (int c = 0; c < NUM_CORES; c++) begin
      mru_n[c] = mru_q[c];
      lru_n[c] = lru_q[c];
      if (acc_valid_i && acc_core_i == 1'(c)) begin
        if (acc_mru_i) mru_n[c] = mru_q[c] + CW'(1);
        if (acc_lru_i) lru_n[c] = lru_q[c] + CW'(1);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      samp_q        <= '0;
      sample_done_o <= 1'b0;
      for (int c = 0; c < NUM_CORES; c++) begin
        mru_q[c]     <= '0;
        lru_q[c]     <= '0;
        mru_cnt_o[c] <= '0;
        lru_cnt_o[c] <= '0;
      end
    end else begin
      sample_done_o <= last;
      if (acc_valid_i) samp_q <= samp_q + SAMPLE_BITS'(1);
      for (int c = 0; c < NUM_CORES; c++) begin
        if (last) begin
          mru_cnt_o[c] <= mru_n[c];
          lru_cnt_o[c] <= lru_n[c];
          mru_q[c]     <= '0;
          lru_q[c]     <= '0;
        end else begin
          mru_q[c]     <= mru_n[c];
          lru_q[c]     <= lru_n[c];
        end
      end
    end
  end

endmodule
