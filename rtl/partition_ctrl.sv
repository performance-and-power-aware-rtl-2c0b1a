// partition_ctrl: the cache control circuit of the power-aware partitioned L2.
//
// Per sampling interval it turns the two cores' MRU/LRU hit counts into
//   * a way-allocation decision (move_o): the core with the larger cache
//     requirement D gains one way from the other, and
//   * one power-control command per core (cmd_o): INC / KEEP / DEC.
// It is built from the parts of the control block diagram: two dividers
// (D0, D1), the D comparator (way allocation), two threshold comparators
// (local assessment against T1/T2) and two n-bit state machines (global
// assessment). The thresholds are inputs so that the policy can be set
// between performance-oriented (small T1/T2) and energy-oriented (large
// T1/T2) at run time.
//
// Timing: start_i is accepted while busy_o is low; both dividers run in
// parallel and done_o pulses, with move_o, cmd_o and d_o valid, QW + 2
// edges after the start edge. The state machines advance exactly once per
// accepted start. Results hold until the next start.
module partition_ctrl
  import wac_pkg::*;
#(
  parameter int unsigned SAMPLE_BITS = 16,
  parameter int unsigned FRAC_BITS   = 16,
  parameter int unsigned SM_BITS     = 3,
  parameter bit          SM_ASYM     = 1'b1,
  localparam int unsigned CW         = SAMPLE_BITS + 1,
  localparam int unsigned DW         = CW + FRAC_BITS
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start_i,
  input  logic [CW-1:0]      mru_cnt_i [NUM_CORES],
  input  logic [CW-1:0]      lru_cnt_i [NUM_CORES],
  input  logic [DW-1:0]      t1_i,
  input  logic [DW-1:0]      t2_i,
  output logic               busy_o,
  output logic               done_o,
  output move_e              move_o,
  output resize_e            cmd_o   [NUM_CORES],
  output resize_e            req_o   [NUM_CORES],   // local requests, for observation
  output logic [DW-1:0]      d_o     [NUM_CORES],
  output logic [SM_BITS-1:0] state_o [NUM_CORES]
);

  logic          div_busy [NUM_CORES];
  logic          div_done [NUM_CORES];
  logic [DW-1:0] d        [NUM_CORES];
  resize_e       lreq     [NUM_CORES];
  resize_e       gcmd     [NUM_CORES];
  move_e         mv;
  logic          step;
  logic          busy_q, done_q;

  assign step = div_done[0];   // both dividers finish on the same edge

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    d_divider #(.CW(CW), .FRAC_BITS(FRAC_BITS)) u_div (
      .clk, .rst_n,
      .start_i (start_i && !busy_q),
      .lru_i   (lru_cnt_i[c]),
      .mru_i   (mru_cnt_i[c]),
      .busy_o  (div_busy[c]),
      .done_o  (div_done[c]),
      .d_o     (d[c])
    );

    t_comp #(.DW(DW)) u_tcomp (
      .d_i (d[c]), .t1_i, .t2_i, .req_o (lreq[c])
    );

    resize_fsm #(.SM_BITS(SM_BITS), .ASYM(SM_ASYM)) u_state (
      .clk, .rst_n,
      .step_i  (step),
      .req_i   (lreq[c]),
      .cmd_o   (gcmd[c]),
      .state_o (state_o[c])
    );
  end

  d_comp #(.DW(DW)) u_dcomp (.d0_i (d[0]), .d1_i (d[1]), .move_o (mv));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      done_q <= 1'b0;
      move_o <= MV_NONE;
      for (int c = 0; c < NUM_CORES; c++) begin
        cmd_o[c] <= RS_KEEP;
        req_o[c] <= RS_KEEP;
        d_o[c]   <= '0;
      end
    end else begin
      done_q <= 1'b0;
      if (start_i && !busy_q) busy_q <= 1'b1;
      if (step) begin
        busy_q <= 1'b0;
        done_q <= 1'b1;
        move_o <= mv;
        for (int c = 0; c < NUM_CORES; c++) begin
          cmd_o[c] <= gcmd[c];
          req_o[c] <= lreq[c];
          d_o[c]   <= d[c];
        end
      end
    end
  end

  assign busy_o = busy_q || div_busy[0];
  assign done_o = done_q;

endmodule
