// tb_t_comp: local assessment. Random D values around random thresholds
// T1 < T2, including the equality corners, against the rule
// D < T1 -> dec, D > T2 -> inc, otherwise keep.
module tb_t_comp;
  import wac_pkg::*;
  localparam int DW = 33;
  int checks = 0, failures = 0;
  logic [DW-1:0] d, t1, t2;
  resize_e req;
  resize_e exp;

  t_comp #(.DW(DW)) dut (.d_i(d), .t1_i(t1), .t2_i(t2), .req_o(req));

  initial begin
    for (int n = 0; n < 5000; n++) begin
      t1 = DW'($urandom_range(0, 20000));
      t2 = t1 + DW'($urandom_range(0, 20000));
      case ($urandom_range(0, 4))
        0: d = t1;
        1: d = t2;
        2: d = (t1 == 0) ? t1 : t1 - 1;
        3: d = t2 + 1;
        default: d = DW'($urandom_range(0, 50000));
      endcase
      #1;
      if (longint'(d) < longint'(t1))      exp = RS_DEC;
      else if (longint'(d) > longint'(t2)) exp = RS_INC;
      else                                 exp = RS_KEEP;
      checks++;
      if (req != exp) begin
        failures++;
        if (failures < 10) $display("FAIL d=%0d t1=%0d t2=%0d got %0d", d, t1, t2, req);
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
