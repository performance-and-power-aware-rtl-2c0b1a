// way_manager: owner and power state of every L2 way.
//
// Each way belongs to exactly one of the two cores (its "allocated" area)
// and is either powered (activated) or power-gated. After each sampling
// interval the control circuit delivers one allocation decision and one
// resize command per core, which are carried out in this order:
//   1. Way allocation: the losing core hands one way to the gaining core.
//      This is skipped when both cores already hold powered-off ways (the
//      move could not reduce conflicts) and when the losing core holds no
//      more than MIN_WAYS ways. A powered-off way of the losing core is
//      handed over if it has one (it is empty and changes owner at once);
//      otherwise a powered way is first flushed (dirty lines written back,
//      all lines invalidated) and then handed over, still powered. So a
//      core never finds the other core's lines in its own ways, which would
//      both let it reach ways it does not own and disturb its MRU/LRU
//      statistics.
//   2. Power control of core 0, then of core 1: INC powers up one of the
//      core's powered-off ways, if any; DEC powers down one of its powered
//      ways if it has more than MIN_WAYS of them (an MRU and an LRU line are
//      needed to measure D). Before a way is powered down, the cache is
//      asked to flush it (write back dirty lines, invalidate all lines), and
//      the way is turned off only when flush_done_i arrives. From the
//      decision on, the way is no longer offered for replacement.
// The way to hand over or to switch is picked at random among the
// candidates: a free-running 16-bit LFSR gives the starting point of a
// rotating search.
//
// With part_en_i low the cache runs as a conventional shared cache: both
// cores may replace in every way, decisions are ignored, and every way is
// powered up again. Reset state: all ways powered, the lower half owned by
// core 0 and the upper half by core 1 (choices of this implementation).
//
// Interface: decisions are taken with dec_valid_i while busy_o is low.
// way_on_o drives the per-way power switches; repl_mask_o gives, per core,
// the ways in which that core may allocate new lines.
module way_manager
  import wac_pkg::*;
#(
  parameter int unsigned WAYS     = 32,
  parameter int unsigned MIN_WAYS = 2,
  localparam int unsigned WIW     = $clog2(WAYS)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            part_en_i,
  input  logic            dec_valid_i,
  input  move_e           move_i,
  input  resize_e         cmd_i        [NUM_CORES],
  output logic            busy_o,
  // cache side
  output logic            flush_req_o,
  output logic [WIW-1:0]  flush_way_o,
  input  logic            flush_done_i,
  output logic [WAYS-1:0] way_on_o,
  output logic [WAYS-1:0] way_owner_o,          // 0: core 0, 1: core 1
  output logic [WAYS-1:0] repl_mask_o  [NUM_CORES],
  // one-cycle event pulses
  output logic            ev_move_o,
  output logic            ev_move_skip_o,
  output logic            ev_on_o,
  output logic            ev_off_o
);

  typedef enum logic [2:0] {S_IDLE, S_MOVE, S_PC0, S_PC1, S_FLUSH} state_e;

  state_e          st_q;
  state_e          ret_q;         // where to continue after a flush
  logic            fl_move_q;     // the flush empties a way that changes owner
  logic [WAYS-1:0] active_q, owner_q, pend_q;
  move_e           move_q;
  resize_e         cmd_q [NUM_CORES];
  logic [WIW-1:0]  flush_way_q;
  logic            flush_req_q;
  logic [15:0]     lfsr_q;

  initial begin
    assert (WAYS >= 2 * MIN_WAYS && (WAYS & (WAYS - 1)) == 0)
      else $error("way_manager: WAYS must be a power of two >= 2*MIN_WAYS");
  end

  function automatic int unsigned count(input logic [WAYS-1:0] v);
    int unsigned n = 0;
    for (int i = 0; i < WAYS; i++) n += int'(v[i]);
    return n;
  endfunction

  // first set bit of v at or after position start, searching cyclically
  function automatic logic [WIW-1:0] pick(input logic [WAYS-1:0] v,
                                          input logic [WIW-1:0]  start);
    logic [WIW-1:0] idx, res;
    logic           found;
    res   = '0;
    found = 1'b0;
    for (int i = 0; i < WAYS; i++) begin
      idx = start + WIW'(i);
      if (!found && v[idx]) begin
        res   = idx;
        found = 1'b1;
      end
    end
    return res;
  endfunction

  logic [WAYS-1:0] own   [NUM_CORES];
  logic [WAYS-1:0] on_c  [NUM_CORES];   // powered ways of core c
  logic [WAYS-1:0] off_c [NUM_CORES];   // powered-off ways of core c

  always_comb begin
    for (int c = 0; c < NUM_CORES; c++) begin
      own[c]   = (c == 0) ? ~owner_q : owner_q;
      on_c[c]  = own[c] & active_q;
      off_c[c] = own[c] & ~active_q;
      repl_mask_o[c] = part_en_i ? (on_c[c] & ~pend_q) : (active_q & ~pend_q);
    end
  end

  // current power-control core and command
  logic    pc_core;
  resize_e pc_cmd;
  assign pc_core = (st_q == S_PC1);
  assign pc_cmd  = cmd_q[pc_core];

  // allocation move: donor core, whether the move is allowed, which way
  logic           mv_donor, mv_ok;
  logic [WIW-1:0] mv_way;
  // power control: candidate ways to switch on / off
  logic           pc_can_on, pc_can_off;
  logic [WIW-1:0] pc_on_way, pc_off_way;

  always_comb begin
    mv_donor = (move_q == MV_TO_C0);          // core 1 donates when core 0 gains
    mv_ok    = (move_q != MV_NONE)
            && !(off_c[0] != '0 && off_c[1] != '0)
            && (count(own[mv_donor]) > MIN_WAYS);
    mv_way   = pick((off_c[mv_donor] != '0) ? off_c[mv_donor] : on_c[mv_donor],
                    lfsr_q[WIW-1:0]);
    pc_can_on  = (pc_cmd == RS_INC) && (off_c[pc_core] != '0);
    pc_can_off = (pc_cmd == RS_DEC) && (count(on_c[pc_core]) > MIN_WAYS);
    pc_on_way  = pick(off_c[pc_core], lfsr_q[WIW-1:0]);
    pc_off_way = pick(on_c[pc_core], lfsr_q[WIW-1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q           <= S_IDLE;
      ret_q          <= S_IDLE;
      fl_move_q      <= 1'b0;
      active_q       <= '1;
      for (int i = 0; i < WAYS; i++) owner_q[i] <= (i >= WAYS / 2);
      pend_q         <= '0;
      move_q         <= MV_NONE;
      cmd_q[0]       <= RS_KEEP;
      cmd_q[1]       <= RS_KEEP;
      flush_way_q    <= '0;
      flush_req_q    <= 1'b0;
      lfsr_q         <= 16'hACE1;
      ev_move_o      <= 1'b0;
      ev_move_skip_o <= 1'b0;
      ev_on_o        <= 1'b0;
      ev_off_o       <= 1'b0;
    end else begin
      lfsr_q         <= {lfsr_q[14:0], lfsr_q[15] ^ lfsr_q[13] ^ lfsr_q[12] ^ lfsr_q[10]};
      ev_move_o      <= 1'b0;
      ev_move_skip_o <= 1'b0;
      ev_on_o        <= 1'b0;
      ev_off_o       <= 1'b0;
      unique case (st_q)
        S_IDLE: begin
          if (!part_en_i) begin
            if (active_q != '1) begin
              active_q <= '1;
              ev_on_o  <= 1'b1;
            end
          end else if (dec_valid_i) begin
            move_q   <= move_i;
            cmd_q[0] <= cmd_i[0];
            cmd_q[1] <= cmd_i[1];
            st_q     <= S_MOVE;
          end
        end
        S_MOVE: begin
          st_q <= S_PC0;
          if (mv_ok && !active_q[mv_way]) begin
            owner_q[mv_way] <= ~mv_donor;          // empty way: hand over now
            ev_move_o       <= 1'b1;
          end else if (mv_ok) begin
            pend_q[mv_way]  <= 1'b1;               // powered way: flush first
            flush_way_q     <= mv_way;
            flush_req_q     <= 1'b1;
            fl_move_q       <= 1'b1;
            ret_q           <= S_PC0;
            st_q            <= S_FLUSH;
          end else if (move_q != MV_NONE) begin
            ev_move_skip_o  <= 1'b1;
          end
        end
        S_PC0, S_PC1: begin
          st_q <= (st_q == S_PC0) ? S_PC1 : S_IDLE;
          if (pc_can_on) begin
            active_q[pc_on_way] <= 1'b1;
            ev_on_o             <= 1'b1;
          end else if (pc_can_off) begin
            pend_q[pc_off_way] <= 1'b1;
            flush_way_q        <= pc_off_way;
            flush_req_q        <= 1'b1;
            fl_move_q          <= 1'b0;
            ret_q              <= (st_q == S_PC0) ? S_PC1 : S_IDLE;
            st_q               <= S_FLUSH;
          end
        end
        S_FLUSH: begin
          if (flush_done_i) begin
            flush_req_q           <= 1'b0;
            pend_q[flush_way_q]   <= 1'b0;
            st_q                  <= ret_q;
            if (fl_move_q) begin
              owner_q[flush_way_q] <= ~owner_q[flush_way_q];
              ev_move_o            <= 1'b1;
            end else begin
              active_q[flush_way_q] <= 1'b0;
              ev_off_o              <= 1'b1;
            end
          end
        end
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign busy_o      = (st_q != S_IDLE);
  assign flush_req_o = flush_req_q;
  assign flush_way_o = flush_way_q;
  assign way_on_o    = active_q;
  assign way_owner_o = owner_q;

endmodule
