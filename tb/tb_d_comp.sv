// tb_d_comp: way-allocation comparator. Random and equal pairs (D0, D1)
// against: D0 > D1 -> core 0 gains a way, D0 < D1 -> core 1, equal -> none.
module tb_d_comp;
  import wac_pkg::*;
  localparam int DW = 33;
  int checks = 0, failures = 0;
  logic [DW-1:0] d0, d1;
  move_e mv, exp;

  d_comp #(.DW(DW)) dut (.d0_i(d0), .d1_i(d1), .move_o(mv));

  initial begin
    for (int n = 0; n < 5000; n++) begin
      d0 = {1'($urandom_range(0, 1)), 32'($urandom)};
      d1 = ($urandom_range(0, 3) == 0) ? d0 : {1'($urandom_range(0, 1)), 32'($urandom)};
      if ($urandom_range(0, 3) == 0) d1 = d0 + 1;
      #1;
      if (longint'(d0) > longint'(d1))      exp = MV_TO_C0;
      else if (longint'(d0) < longint'(d1)) exp = MV_TO_C1;
      else                                  exp = MV_NONE;
      checks++;
      if (mv != exp) begin
        failures++;
        if (failures < 10) $display("FAIL d0=%0d d1=%0d got %0d", d0, d1, mv);
      end
    end
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
