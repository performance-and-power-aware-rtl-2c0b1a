// resize_fsm: global assessment of the cache requirement.
//
// An n-bit saturating state machine, in the spirit of an n-bit branch
// predictor, filters the per-interval resize requests of the local
// assessment so that a way is powered up or down only when the request is
// persistent. State 0 is the "up-size" end and state 2^n-1 the "down-size"
// end:
//   * dec  : the state moves one step toward 2^n-1; DEC is issued when the
//            machine was already in one of the last two states (it then
//            saturates at 2^n-1), otherwise KEEP.
//   * keep : the state holds, KEEP is issued.
//   * inc  : symmetric machine - the mirror of dec (one step toward 0, INC
//            only from states 0 and 1); asymmetric machine - INC at once and
//            the state returns to 0 from anywhere.
// For n = 3 this is exactly the pair of transition tables the design was
// specified with (symmetric and asymmetric 3-bit machines); the asymmetric
// 3-bit machine is the default. Resetting into state 0 is a choice of this
// implementation.
//
// Interface: cmd_o is a combinational (Mealy) function of state_o and req_i;
// the state advances on a clock edge only when step_i is high, once per
// sampling interval.
module resize_fsm
  import wac_pkg::*;
#(
  parameter int unsigned SM_BITS = 3,     // n, number of state bits
  parameter bit          ASYM    = 1'b1   // 1: asymmetric, 0: symmetric
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               step_i,      // evaluate one request
  input  resize_e            req_i,       // local request inc/keep/dec
  output resize_e            cmd_o,       // INC/KEEP/DEC for this request
  output logic [SM_BITS-1:0] state_o
);

  localparam logic [SM_BITS-1:0] S_MAX = {SM_BITS{1'b1}};

  logic [SM_BITS-1:0] state_q, state_d;

  initial begin
    assert (SM_BITS >= 1) else $error("resize_fsm: SM_BITS must be >= 1");
  end

  always_comb begin
    state_d = state_q;
    cmd_o   = RS_KEEP;
    unique case (req_i)
      RS_INC: begin
        if (ASYM || state_q <= SM_BITS'(1)) begin
          cmd_o   = RS_INC;
          state_d = '0;
        end else begin
          state_d = state_q - SM_BITS'(1);
        end
      end
      RS_DEC: begin
        if (state_q >= S_MAX - SM_BITS'(1)) begin
          cmd_o   = RS_DEC;
          state_d = S_MAX;
        end else begin
          state_d = state_q + SM_BITS'(1);
        end
      end
      default: ;  // keep
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      state_q <= '0;
    else if (step_i) state_q <= state_d;
  end

  assign state_o = state_q;

endmodule
