// tb_resize_fsm: checks the 3-bit symmetric and asymmetric resize state
// machines against their full transition tables (every state x every input),
// written out here independently of the RTL, then runs a random request
// sequence through both and compares state and command every step.
module tb_resize_fsm;
  import wac_pkg::*;

  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge for the asynchronous reset
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic    step;
  resize_e req;
  resize_e cmd_s, cmd_a;
  logic [2:0] st_s, st_a;

  resize_fsm #(.SM_BITS(3), .ASYM(1'b0)) u_sym  (.clk, .rst_n, .step_i(step), .req_i(req), .cmd_o(cmd_s), .state_o(st_s));
  resize_fsm #(.SM_BITS(3), .ASYM(1'b1)) u_asym (.clk, .rst_n, .step_i(step), .req_i(req), .cmd_o(cmd_a), .state_o(st_a));

  // reference tables: next state and output, index [state][input inc/keep/dec]
  int unsigned ns_sym [8][3] = '{'{0,0,1},'{0,1,2},'{1,2,3},'{2,3,4},'{3,4,5},'{4,5,6},'{5,6,7},'{6,7,7}};
  int unsigned ns_asy [8][3] = '{'{0,0,1},'{0,1,2},'{0,2,3},'{0,3,4},'{0,4,5},'{0,5,6},'{0,6,7},'{0,7,7}};
  // output: 1 = INC, 0 = KEEP, 2 = DEC
  int unsigned o_sym  [8][3] = '{'{1,0,0},'{1,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,0},'{0,0,2},'{0,0,2}};
  int unsigned o_asy  [8][3] = '{'{1,0,0},'{1,0,0},'{1,0,0},'{1,0,0},'{1,0,0},'{1,0,0},'{1,0,2},'{1,0,2}};

  function automatic resize_e in_of(int i);
    return (i == 0) ? RS_INC : (i == 1) ? RS_KEEP : RS_DEC;
  endfunction
  function automatic resize_e out_of(int unsigned o);
    return (o == 1) ? RS_INC : (o == 2) ? RS_DEC : RS_KEEP;
  endfunction

  // drive both machines to state s with the inputs of the tables
  task automatic go_to(int unsigned s);
    rst_n = 1'b0; step = 1'b0; req = RS_KEEP;
    @(posedge clk); #1 rst_n = 1'b1;
    for (int k = 0; k < int'(s); k++) begin
      req = RS_DEC; step = 1'b1; @(posedge clk); #1;
    end
    step = 1'b0;
  endtask

  int unsigned rs, ra;

  initial begin
    step = 1'b0; req = RS_KEEP;
    for (int s = 0; s < 8; s++) begin
      for (int i = 0; i < 3; i++) begin
        go_to(s);
        checks++;
        if (st_s != 3'(s) || st_a != 3'(s)) begin failures++; $display("FAIL reach state %0d", s); end
        req = in_of(i); #1;
        checks += 2;
        if (cmd_s != out_of(o_sym[s][i])) begin failures++; $display("FAIL sym out s=%0d in=%0d", s, i); end
        if (cmd_a != out_of(o_asy[s][i])) begin failures++; $display("FAIL asym out s=%0d in=%0d", s, i); end
        step = 1'b1; @(posedge clk); #1 step = 1'b0;
        checks += 2;
        if (st_s != 3'(ns_sym[s][i])) begin failures++; $display("FAIL sym next s=%0d in=%0d got %0d", s, i, st_s); end
        if (st_a != 3'(ns_asy[s][i])) begin failures++; $display("FAIL asym next s=%0d in=%0d got %0d", s, i, st_a); end
      end
    end
    // state must not move without step
    go_to(3); req = RS_INC; @(posedge clk); #1;
    checks++; if (st_s != 3'd3 || st_a != 3'd3) begin failures++; $display("FAIL moved without step"); end
    // random sequence against the tables
    go_to(0); rs = 0; ra = 0;
    for (int n = 0; n < 2000; n++) begin
      automatic int i = $urandom_range(0, 2);
      req = in_of(i); step = 1'b1; #1;
      checks += 2;
      if (cmd_s != out_of(o_sym[rs][i])) failures++;
      if (cmd_a != out_of(o_asy[ra][i])) failures++;
      @(posedge clk); #1;
      rs = ns_sym[rs][i]; ra = ns_asy[ra][i];
      checks += 2;
      if (st_s != 3'(rs)) failures++;
      if (st_a != 3'(ra)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
