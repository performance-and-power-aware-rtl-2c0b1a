// pa_shared_l2: power-aware, dynamically partitioned shared L2 cache for a
// two-core chip multiprocessor.
//
// Two cores running unrelated programs share one highly associative L2.
// Left alone, the core with the larger or less local working set pushes
// the other one's lines out (shared-cache conflict). This cache hands each
// way to one core, so that each core replaces only in its own ways, and it
// switches off (power-gates) the ways a core does not need. Both decisions
// use one cheap measure of each core's cache requirement,
//     D = (hits on the core's LRU line) / (hits on its MRU line),
// taken over a sampling interval of 2^SAMPLE_BITS L2 accesses. Small D means
// the accesses crowd near the MRU line (few ways suffice); large D means
// they reach down to the LRU line (more ways would help).
//
// At the end of each interval:
//   * way allocation: the core with the larger D takes one way from the
//     other (skipped when both cores already have switched-off ways);
//   * power control, per core: D is compared with thresholds T1 < T2
//     (below T1: request fewer ways, above T2: request more), and an n-bit
//     state machine passes a request on only when it persists (the default
//     asymmetric machine passes "more ways" at once and "fewer ways" only
//     after several intervals). A way is written back and invalidated
//     before it is switched off.
//
// Blocks: req_arbiter -> way_adaptable_cache (tags, data, LRU, flush) ->
// access_monitor (MRU/LRU hit counts) -> partition_ctrl (dividers,
// comparators, state machines) -> way_manager (way owners, power state,
// flush sequencing) -> back to the cache's masks and the way_power_o pins.
//
// Interface: per-core request/response ports (L1-line-sized reads and
// writes), a line-wide main-memory port, the thresholds t1_i/t2_i in the
// unsigned fixed-point format of D (FRAC_BITS fraction bits), part_en_i
// selecting partitioned (1) or conventional shared (0) operation, and
// way_power_o, one enable per way for the power switches. Timing of the
// request ports is that of way_adaptable_cache (HIT_LAT-cycle hits,
// blocking).
//
// The default size (1 MB, 32 ways, 64-byte lines, 14-cycle hit, 3-bit
// asymmetric state machine, 2^16-access interval) is the configuration the
// design was evaluated in; the fixed-point format of D, the port protocol
// and the behaviour in conventional mode are choices of this
// implementation. A decision that arrives while the way manager is still
// carrying out the previous one (possible only with very short intervals)
// is dropped.
//
// Lint note: rst_n resets the flip-flops asynchronously and also disables
// the handshake assertions of the sub-blocks, which a linter reports as a
// signal used both asynchronously and synchronously; the assertion use is
// simulation-only and the warning is expected.
module pa_shared_l2
  import wac_pkg::*;
#(
  parameter int unsigned WAYS        = 32,
  parameter int unsigned SETS        = 512,
  parameter int unsigned LINE_BYTES  = 64,
  parameter int unsigned PORT_BYTES  = 32,
  parameter int unsigned ADDR_W      = 32,
  parameter int unsigned HIT_LAT     = 14,
  parameter int unsigned SAMPLE_BITS = 16,
  parameter int unsigned FRAC_BITS   = 16,
  parameter int unsigned SM_BITS     = 3,
  parameter bit          SM_ASYM     = 1'b1,
  parameter int unsigned MIN_WAYS    = 2,
  localparam int unsigned DW         = SAMPLE_BITS + 1 + FRAC_BITS,
  localparam int unsigned LB         = LINE_BYTES * 8,
  localparam int unsigned PB         = PORT_BYTES * 8,
  localparam int unsigned LAW        = ADDR_W - $clog2(LINE_BYTES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              part_en_i,
  input  logic [DW-1:0]     t1_i,
  input  logic [DW-1:0]     t2_i,
  // cores (from their L1 caches)
  input  logic              c_req_valid_i [NUM_CORES],
  output logic              c_req_ready_o [NUM_CORES],
  input  logic              c_req_we_i    [NUM_CORES],
  input  logic [ADDR_W-1:0] c_req_addr_i  [NUM_CORES],
  input  logic [PB-1:0]     c_req_wdata_i [NUM_CORES],
  output logic              c_rsp_valid_o [NUM_CORES],
  output logic              c_rsp_hit_o,
  output logic [PB-1:0]     c_rsp_rdata_o,
  // main memory
  output logic              mem_req_valid_o,
  input  logic              mem_req_ready_i,
  output logic              mem_req_we_o,
  output logic [LAW-1:0]    mem_req_addr_o,
  output logic [LB-1:0]     mem_req_wdata_o,
  input  logic              mem_rsp_valid_i,
  input  logic [LB-1:0]     mem_rsp_rdata_i,
  // power switches and status
  output logic [WAYS-1:0]   way_power_o,
  output logic [WAYS-1:0]   way_owner_o,
  output logic [DW-1:0]     d_o [NUM_CORES],
  output logic              interval_o,      // pulses when a decision is taken
  output resize_e           cmd_o [NUM_CORES],   // power-control commands of that decision
  output resize_e           lreq_o [NUM_CORES],  // threshold requests (inc/keep/dec) behind them
  output logic [SM_BITS-1:0] sm_state_o [NUM_CORES], // state of each core's state machine
  output wac_events_t       events_o
);

  localparam int unsigned WIW = $clog2(WAYS);
  localparam int unsigned CW  = SAMPLE_BITS + 1;

  // arbiter -> cache
  logic              a_valid, a_ready, a_core, a_we;
  logic [ADDR_W-1:0] a_addr;
  logic [PB-1:0]     a_wdata;
  logic              rsp_valid, rsp_core;

  // cache <-> way manager
  logic [WAYS-1:0]   way_on;
  logic [WAYS-1:0]   repl_mask [NUM_CORES];
  logic              flush_req, flush_done;
  logic [WIW-1:0]    flush_way;

  // monitor / control
  logic              acc_valid, acc_core, acc_mru, acc_lru;
  logic [CW-1:0]     mru_cnt [NUM_CORES];
  logic [CW-1:0]     lru_cnt [NUM_CORES];
  logic              sample_done, ctrl_busy, ctrl_done, wm_busy;
  logic              ctrl_start;
  move_e             move;
  resize_e           cmd  [NUM_CORES];
  logic              ev_move, ev_skip, ev_on, ev_off;

  req_arbiter #(.ADDR_W(ADDR_W), .PB(PB)) u_arb (
    .clk, .rst_n,
    .c_valid_i (c_req_valid_i),
    .c_ready_o (c_req_ready_o),
    .c_we_i    (c_req_we_i),
    .c_addr_i  (c_req_addr_i),
    .c_wdata_i (c_req_wdata_i),
    .valid_o   (a_valid),
    .ready_i   (a_ready),
    .core_o    (a_core),
    .we_o      (a_we),
    .addr_o    (a_addr),
    .wdata_o   (a_wdata)
  );

  way_adaptable_cache #(
    .WAYS(WAYS), .SETS(SETS), .LINE_BYTES(LINE_BYTES), .PORT_BYTES(PORT_BYTES),
    .ADDR_W(ADDR_W), .HIT_LAT(HIT_LAT)
  ) u_cache (
    .clk, .rst_n,
    .req_valid_i     (a_valid),
    .req_ready_o     (a_ready),
    .req_core_i      (a_core),
    .req_we_i        (a_we),
    .req_addr_i      (a_addr),
    .req_wdata_i     (a_wdata),
    .rsp_valid_o     (rsp_valid),
    .rsp_core_o      (rsp_core),
    .rsp_hit_o       (c_rsp_hit_o),
    .rsp_rdata_o     (c_rsp_rdata_o),
    .way_on_i        (way_on),
    .repl_mask_i     (repl_mask),
    .flush_req_i     (flush_req),
    .flush_way_i     (flush_way),
    .flush_done_o    (flush_done),
    .acc_valid_o     (acc_valid),
    .acc_core_o      (acc_core),
    .acc_mru_o       (acc_mru),
    .acc_lru_o       (acc_lru),
    .mem_req_valid_o,
    .mem_req_ready_i,
    .mem_req_we_o,
    .mem_req_addr_o,
    .mem_req_wdata_o,
    .mem_rsp_valid_i,
    .mem_rsp_rdata_i
  );

  assign c_rsp_valid_o[0] = rsp_valid && !rsp_core;
  assign c_rsp_valid_o[1] = rsp_valid &&  rsp_core;

  // an interval is evaluated only in partitioned mode and when neither the
  // control circuit nor the way manager is still busy with the previous one
  assign ctrl_start = sample_done && part_en_i && !wm_busy && !ctrl_busy;

  access_monitor #(.SAMPLE_BITS(SAMPLE_BITS)) u_mon (
    .clk, .rst_n,
    .acc_valid_i   (acc_valid),
    .acc_core_i    (acc_core),
    .acc_mru_i     (acc_mru),
    .acc_lru_i     (acc_lru),
    .mru_cnt_o     (mru_cnt),
    .lru_cnt_o     (lru_cnt),
    .sample_done_o (sample_done)
  );

  partition_ctrl #(
    .SAMPLE_BITS(SAMPLE_BITS), .FRAC_BITS(FRAC_BITS),
    .SM_BITS(SM_BITS), .SM_ASYM(SM_ASYM)
  ) u_ctrl (
    .clk, .rst_n,
    .start_i   (ctrl_start),
    .mru_cnt_i (mru_cnt),
    .lru_cnt_i (lru_cnt),
    .t1_i, .t2_i,
    .busy_o    (ctrl_busy),
    .done_o    (ctrl_done),
    .move_o    (move),
    .cmd_o     (cmd),
    .req_o     (lreq_o),
    .d_o       (d_o),
    .state_o   (sm_state_o)
  );

  way_manager #(.WAYS(WAYS), .MIN_WAYS(MIN_WAYS)) u_wm (
    .clk, .rst_n,
    .part_en_i,
    .dec_valid_i    (ctrl_done),
    .move_i         (move),
    .cmd_i          (cmd),
    .busy_o         (wm_busy),
    .flush_req_o    (flush_req),
    .flush_way_o    (flush_way),
    .flush_done_i   (flush_done),
    .way_on_o       (way_on),
    .way_owner_o    (way_owner_o),
    .repl_mask_o    (repl_mask),
    .ev_move_o      (ev_move),
    .ev_move_skip_o (ev_skip),
    .ev_on_o        (ev_on),
    .ev_off_o       (ev_off)
  );

  assign way_power_o = way_on;
  assign interval_o  = ctrl_done;
  assign cmd_o       = cmd;
  assign events_o    = '{way_move: ev_move, way_move_skip: ev_skip,
                         way_on: ev_on, way_off: ev_off};

endmodule
