// d_divider: computes the cache requirement metric D = LRUcount / MRUcount.
//
// A radix-2 restoring divider, one quotient bit per clock. The dividend is
// LRUcount shifted left by FRAC_BITS, so the quotient is D as an unsigned
// fixed-point number with FRAC_BITS fraction bits and CW integer bits
// (QW = CW + FRAC_BITS bits in all). The design only calls for an integer
// divider; the sequential form and the fixed-point scaling are choices of
// this implementation, justified by the divider being used once per
// sampling interval of thousands of accesses.
//
// Special cases: MRUcount = 0 with LRUcount > 0 gives the all-ones
// (largest) D; 0/0 gives D = 0.
//
// Timing: start_i is taken when the divider is idle (busy_o low). The
// result appears on d_o together with a one-cycle done_o pulse QW + 1 clock
// edges after the edge that took start_i, and d_o holds until the next
// start.
module d_divider #(
  parameter int unsigned CW        = 17,  // width of the two counts
  parameter int unsigned FRAC_BITS = 16,
  localparam int unsigned QW       = CW + FRAC_BITS
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start_i,
  input  logic [CW-1:0] lru_i,
  input  logic [CW-1:0] mru_i,
  output logic          busy_o,
  output logic          done_o,
  output logic [QW-1:0] d_o
);

  localparam int unsigned SW = $clog2(QW + 1);

  logic [QW-1:0] dvd_q;      // dividend bits still to consume / quotient
  logic [CW-1:0] rem_q;      // partial remainder (always < divisor)
  logic [CW-1:0] dvs_q;      // divisor
  logic [SW-1:0] step_q;
  logic          busy_q, done_q, zero_q;
  logic [QW-1:0] res_q;

  logic [CW:0]   rem_sh;
  logic          ge;

  assign rem_sh = {rem_q, dvd_q[QW-1]};
  assign ge     = rem_sh >= {1'b0, dvs_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvd_q  <= '0;
      rem_q  <= '0;
      dvs_q  <= '0;
      step_q <= '0;
      busy_q <= 1'b0;
      done_q <= 1'b0;
      zero_q <= 1'b0;
      res_q  <= '0;
    end else begin
      done_q <= 1'b0;
      if (!busy_q) begin
        if (start_i) begin
          dvd_q  <= {lru_i, {FRAC_BITS{1'b0}}};
          rem_q  <= '0;
          dvs_q  <= mru_i;
          zero_q <= (lru_i == '0);
          step_q <= '0;
          busy_q <= 1'b1;
        end
      end else if (step_q == SW'(QW)) begin
        busy_q <= 1'b0;
        done_q <= 1'b1;
        res_q  <= zero_q ? '0 : dvd_q;
      end else begin
        rem_q  <= ge ? CW'(rem_sh - {1'b0, dvs_q}) : rem_sh[CW-1:0];
        dvd_q  <= {dvd_q[QW-2:0], ge};
        step_q <= step_q + SW'(1);
      end
    end
  end

  assign busy_o = busy_q;
  assign done_o = done_q;
  assign d_o    = res_q;

endmodule
