// t_comp: local assessment of the cache requirement (threshold comparator).
//
// The cache requirement D = LRUcount / MRUcount of one core for the last
// sampling interval is compared with two thresholds T1 < T2:
//   D < T1  -> dec  (accesses crowd near the MRU line: ways to spare)
//   D > T2  -> inc  (accesses spread to the LRU line: more ways needed)
//   else    -> keep
// Small thresholds bias the cache toward performance, large ones toward
// low power. D, T1 and T2 share one unsigned fixed-point format with
// FRAC_BITS fraction bits (the format is this implementation's choice).
// Purely combinational.
module t_comp
  import wac_pkg::*;
#(
  parameter int unsigned DW = 33          // width of D and the thresholds
) (
  input  logic [DW-1:0] d_i,
  input  logic [DW-1:0] t1_i,
  input  logic [DW-1:0] t2_i,
  output resize_e       req_o
);

  always_comb begin
    if (d_i < t1_i)      req_o = RS_DEC;
    else if (d_i > t2_i) req_o = RS_INC;
    else                 req_o = RS_KEEP;
  end

endmodule
