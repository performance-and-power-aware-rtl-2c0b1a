// d_comp: way-allocation comparator.
//
// Compares the cache requirements of the two cores. The core whose accesses
// reach further down its LRU stack (larger D, lower locality) gains one way
// from the other core; equal requirements leave the partition where it is:
//   D0 > D1 -> MV_TO_C0,  D0 < D1 -> MV_TO_C1,  D0 == D1 -> MV_NONE.
// Purely combinational. Whether the move is actually carried out (both
// cores already holding powered-off ways, a donor at its minimum) is
// decided by the way manager.
module d_comp
  import wac_pkg::*;
#(
  parameter int unsigned DW = 33
) (
  input  logic [DW-1:0] d0_i,
  input  logic [DW-1:0] d1_i,
  output move_e         move_o
);

  always_comb begin
    if (d0_i > d1_i)      move_o = MV_TO_C0;
    else if (d0_i < d1_i) move_o = MV_TO_C1;
    else                  move_o = MV_NONE;
  end

endmodule
