// way_adaptable_cache: set-associative shared L2 whose ways can be powered
// down one by one and are partitioned between two cores.
//
// Organisation: SETS sets x WAYS ways of LINE_BYTES-byte lines with true
// LRU. The LRU state of a set is one age per way (0 = most recently used),
// always a permutation of 0..WAYS-1; a touched way moves to age 0 and every
// younger way ages by one. Because the order is global, the LRU stack of a
// single core's partition is simply this order restricted to that core's
// ways, so per-partition MRU/LRU positions need no extra state.
//
// Access: requests are L1-line sized (PORT_BYTES) reads or writes from one
// of two cores. A lookup matches the tag in every powered way. On a miss
// the victim is taken only from the requesting core's replacement mask (its
// allocated and powered ways): an invalid way there first, else the oldest.
// A dirty victim is written back before the line is fetched from memory.
// Write requests set the line dirty (write-back, write-allocate).
// For every lookup the cache reports whether it hit the requester's MRU
// line (stack position 1) or its LRU line (position equal to the number of
// ways in the mask); this feeds the access monitor.
//
// Power gating: flush_req_i asks for one way to be emptied before it is
// switched off. When idle, the cache walks all sets, writes back every dirty
// line of that way and invalidates every line of it. The request is a
// four-phase handshake: flush_req_i and flush_way_i are held until
// flush_done_o rises, and flush_done_o stays high until flush_req_i falls.
// Core requests wait during the walk. The way's power switch itself is
// outside this module; a powered-off way holds no valid lines.
//
// Timing: a request is taken with req_valid_i && req_ready_o. A hit is
// answered with a one-cycle rsp_valid_o exactly HIT_LAT edges after the
// accepting edge; a miss is answered when the line is back from memory, but
// never sooner than HIT_LAT. One request is in flight at a time (blocking
// cache). After reset the cache spends SETS cycles clearing its tag state
// and holds req_ready_o low meanwhile.
//
// The geometry (1 MB, 32 ways, 64-byte lines, 14-cycle hit) follows the
// design's evaluation configuration. The 32-bit physical address, the
// request port, the blocking organisation and the looking-up of hits in all
// powered ways are choices of this implementation. In partitioned operation
// a way is emptied before it changes owner, so a core then finds only its
// own lines in its own ways, as the design intends; the wider lookup only
// matters right after a switch between conventional and partitioned
// operation, where it keeps lines left in the other core's ways reachable
// (never duplicated) instead of requiring a flush of the whole cache.
//
// Lint notes: the low address bits below the L1-line size are not used (a
// request always moves a whole, aligned L1 line), and rst_n also disables
// the handshake assertions, which a linter reports as a signal used both
// asynchronously and synchronously; both are expected.
module way_adaptable_cache
  import wac_pkg::*;
#(
  parameter int unsigned WAYS       = 32,
  parameter int unsigned SETS       = 512,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned PORT_BYTES = 32,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned HIT_LAT    = 14,
  localparam int unsigned WIW       = $clog2(WAYS),
  localparam int unsigned OFF       = $clog2(LINE_BYTES),
  localparam int unsigned IDXW      = $clog2(SETS),
  localparam int unsigned TAGW      = ADDR_W - OFF - IDXW,
  localparam int unsigned LB        = LINE_BYTES * 8,
  localparam int unsigned PB        = PORT_BYTES * 8,
  localparam int unsigned SUBW      = $clog2(LINE_BYTES / PORT_BYTES),
  localparam int unsigned LAW       = ADDR_W - OFF
) (
  input  logic            clk,
  input  logic            rst_n,
  // core requests (already arbitrated)
  input  logic            req_valid_i,
  output logic            req_ready_o,
  input  logic            req_core_i,
  input  logic            req_we_i,
  input  logic [ADDR_W-1:0] req_addr_i,
  input  logic [PB-1:0]   req_wdata_i,
  output logic            rsp_valid_o,
  output logic            rsp_core_o,
  output logic            rsp_hit_o,
  output logic [PB-1:0]   rsp_rdata_o,
  // way state from the way manager
  input  logic [WAYS-1:0] way_on_i,
  input  logic [WAYS-1:0] repl_mask_i [NUM_CORES],
  input  logic            flush_req_i,
  input  logic [WIW-1:0]  flush_way_i,
  output logic            flush_done_o,
  // access statistics, one pulse per lookup
  output logic            acc_valid_o,
  output logic            acc_core_o,
  output logic            acc_mru_o,
  output logic            acc_lru_o,
  // main memory, whole lines
  output logic            mem_req_valid_o,
  input  logic            mem_req_ready_i,
  output logic            mem_req_we_o,
  output logic [LAW-1:0]  mem_req_addr_o,
  output logic [LB-1:0]   mem_req_wdata_o,
  input  logic            mem_rsp_valid_i,
  input  logic [LB-1:0]   mem_rsp_rdata_i
);

  typedef logic [WAYS-1:0][WIW-1:0]  ages_t;
  typedef logic [WAYS-1:0][TAGW-1:0] tags_t;

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_LOOKUP, S_WB, S_FETCH, S_FWAIT, S_RESP, S_FL_CHK, S_FL_WB, S_FL_DONE
  } state_e;

  initial begin
    assert (SUBW >= 1 && (1 << WIW) == WAYS && (1 << IDXW) == SETS)
      else $error("way_adaptable_cache: WAYS and SETS must be powers of two, LINE_BYTES > PORT_BYTES");
  end

  // ---------------------------------------------------------------- storage
  tags_t           tag_q   [SETS];
  logic [WAYS-1:0] val_q   [SETS];
  logic [WAYS-1:0] dirty_q [SETS];
  ages_t           age_q   [SETS];
  logic [LB-1:0]   data_q  [SETS * WAYS];

  // ---------------------------------------------------------------- control
  state_e            st_q;
  logic              r_core, r_we, r_hit;
  logic [ADDR_W-1:0] r_addr;
  logic [PB-1:0]     r_wdata;
  logic [LB-1:0]     r_line;
  logic [WIW-1:0]    r_way;
  logic [IDXW-1:0]   i_q;        // init / flush set counter
  logic [15:0]       lat_q;

  logic [IDXW-1:0]   r_idx;
  logic [TAGW-1:0]   r_tag;
  logic [SUBW-1:0]   r_sub;
  assign r_idx = r_addr[OFF +: IDXW];
  assign r_tag = r_addr[ADDR_W-1 -: TAGW];
  assign r_sub = r_addr[OFF-1 -: SUBW];

  // ---------------------------------------------------------------- lookup
  tags_t           l_tags;
  ages_t           l_ages;
  logic [WAYS-1:0] l_val, l_dirty, l_mask;
  logic            l_hit, l_mru, l_lru;
  logic [WIW-1:0]  l_hway, l_vict;

  function automatic ages_t touch(input ages_t a, input logic [WIW-1:0] w);
    ages_t r = a;
    for (int i = 0; i < WAYS; i++)
      if (a[i] < a[w]) r[i] = a[i] + WIW'(1);
    r[w] = '0;
    return r;
  endfunction

  function automatic logic [LB-1:0] merge(input logic [LB-1:0] line,
                                          input logic [SUBW-1:0] sub,
                                          input logic [PB-1:0] d);
    logic [LB-1:0] r = line;
    r[sub * PB +: PB] = d;
    return r;
  endfunction

  always_comb begin
    int unsigned pos, depth;
    logic        have_inv;
    logic [WIW-1:0] oldest;

    l_tags  = tag_q[r_idx];
    l_ages  = age_q[r_idx];
    l_val   = val_q[r_idx] & way_on_i;
    l_dirty = dirty_q[r_idx];
    l_mask  = repl_mask_i[r_core];

    l_hit  = 1'b0;
    l_hway = '0;
    for (int w = 0; w < WAYS; w++)
      if (!l_hit && l_val[w] && l_tags[w] == r_tag) begin
        l_hit  = 1'b1;
        l_hway = WIW'(w);
      end

    // stack position of the hit inside the requester's partition
    pos   = 0;
    depth = 0;
    for (int w = 0; w < WAYS; w++) begin
      depth += int'(l_mask[w]);
      if (l_mask[w] && l_val[w] && l_ages[w] < l_ages[l_hway]) pos++;
    end
    l_mru = l_hit && l_mask[l_hway] && (pos == 0);
    l_lru = l_hit && l_mask[l_hway] && (pos + 1 == depth);

    // victim: first invalid way of the mask, else its oldest way
    have_inv = 1'b0;
    l_vict   = '0;
    oldest   = '0;
    for (int w = 0; w < WAYS; w++)
      if (!have_inv && l_mask[w] && !l_val[w]) begin
        have_inv = 1'b1;
        l_vict   = WIW'(w);
      end
    if (!have_inv) begin
      for (int w = 0; w < WAYS; w++)
        if (l_mask[w] && l_ages[w] >= oldest) begin
          oldest = l_ages[w];
          l_vict = WIW'(w);
        end
    end
  end

  assign acc_valid_o = (st_q == S_LOOKUP);
  assign acc_core_o  = r_core;
  assign acc_mru_o   = l_mru;
  assign acc_lru_o   = l_lru;

  // ---------------------------------------------------------------- flush
  logic [IDXW-1:0] f_idx;
  logic            f_dirty;
  assign f_idx   = i_q;
  assign f_dirty = val_q[f_idx][flush_way_i] && dirty_q[f_idx][flush_way_i];

  // ---------------------------------------------------------------- FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q         <= S_INIT;
      i_q          <= '0;
      r_core       <= 1'b0;
      r_we         <= 1'b0;
      r_hit        <= 1'b0;
      r_addr       <= '0;
      r_wdata      <= '0;
      r_line       <= '0;
      r_way        <= '0;
      lat_q        <= '0;
    end else begin
      if (st_q != S_IDLE && lat_q != '1) lat_q <= lat_q + 16'd1;
      unique case (st_q)
        S_INIT: begin
          val_q[i_q]   <= '0;
          dirty_q[i_q] <= '0;
          tag_q[i_q]   <= '0;
          for (int w = 0; w < WAYS; w++) age_q[i_q][w] <= WIW'(w);
          i_q <= i_q + IDXW'(1);
          if (i_q == IDXW'(SETS - 1)) st_q <= S_IDLE;
        end
        S_IDLE: begin
          if (flush_req_i) begin
            i_q  <= '0;
            st_q <= S_FL_CHK;
          end else if (req_valid_i) begin
            r_core  <= req_core_i;
            r_we    <= req_we_i;
            r_addr  <= req_addr_i;
            r_wdata <= req_wdata_i;
            lat_q   <= 16'd1;
            st_q    <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          r_hit <= l_hit;
          if (l_hit) begin
            r_way         <= l_hway;
            age_q[r_idx]  <= touch(l_ages, l_hway);
            if (r_we) begin
              data_q[{r_idx, l_hway}][r_sub * PB +: PB] <= r_wdata;
              dirty_q[r_idx][l_hway] <= 1'b1;
            end else begin
              r_line <= data_q[{r_idx, l_hway}];
            end
            st_q <= S_RESP;
          end else begin
            r_way <= l_vict;
            if (l_val[l_vict] && l_dirty[l_vict]) begin
              r_line <= data_q[{r_idx, l_vict}];
              st_q   <= S_WB;
            end else begin
              st_q   <= S_FETCH;
            end
          end
        end
        S_WB:    if (mem_req_ready_i) st_q <= S_FETCH;
        S_FETCH: if (mem_req_ready_i) st_q <= S_FWAIT;
        S_FWAIT: begin
          if (mem_rsp_valid_i) begin
            automatic logic [LB-1:0] line =
              r_we ? merge(mem_rsp_rdata_i, r_sub, r_wdata) : mem_rsp_rdata_i;
            data_q[{r_idx, r_way}]  <= line;
            r_line                  <= line;
            tag_q[r_idx][r_way]     <= r_tag;
            val_q[r_idx][r_way]     <= 1'b1;
            dirty_q[r_idx][r_way]   <= r_we;
            age_q[r_idx]            <= touch(l_ages, r_way);
            st_q                    <= S_RESP;
          end
        end
        S_RESP: if (lat_q >= 16'(HIT_LAT)) st_q <= S_IDLE;
        S_FL_CHK: begin
          if (f_dirty) begin
            r_line <= data_q[{f_idx, flush_way_i}];
            st_q   <= S_FL_WB;
          end else begin
            val_q[f_idx][flush_way_i]   <= 1'b0;
            dirty_q[f_idx][flush_way_i] <= 1'b0;
            i_q <= i_q + IDXW'(1);
            if (i_q == IDXW'(SETS - 1)) st_q <= S_FL_DONE;
          end
        end
        S_FL_WB: begin
          if (mem_req_ready_i) begin
            val_q[f_idx][flush_way_i]   <= 1'b0;
            dirty_q[f_idx][flush_way_i] <= 1'b0;
            i_q <= i_q + IDXW'(1);
            st_q <= (i_q == IDXW'(SETS - 1)) ? S_FL_DONE : S_FL_CHK;
          end
        end
        S_FL_DONE: if (!flush_req_i) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
    end
  end

  assign req_ready_o  = (st_q == S_IDLE) && !flush_req_i;
  assign flush_done_o = (st_q == S_FL_DONE);

  assign rsp_valid_o = (st_q == S_RESP) && (lat_q >= 16'(HIT_LAT));
  assign rsp_core_o  = r_core;
  assign rsp_hit_o   = r_hit;
  assign rsp_rdata_o = r_line[r_sub * PB +: PB];

  always_comb begin
    mem_req_valid_o = 1'b0;
    mem_req_we_o    = 1'b0;
    mem_req_addr_o  = {r_tag, r_idx};
    mem_req_wdata_o = r_line;
    unique case (st_q)
      S_WB: begin
        mem_req_valid_o = 1'b1;
        mem_req_we_o    = 1'b1;
        mem_req_addr_o  = {l_tags[r_way], r_idx};
      end
      S_FETCH: mem_req_valid_o = 1'b1;
      S_FL_WB: begin
        mem_req_valid_o = 1'b1;
        mem_req_we_o    = 1'b1;
        mem_req_addr_o  = {tag_q[f_idx][flush_way_i], f_idx};
      end
      default: ;
    endcase
  end

  // a memory request is held, unchanged, until it is accepted
  a_mem_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid_o && !mem_req_ready_i |=>
      mem_req_valid_o && $stable(mem_req_addr_o) && $stable(mem_req_we_o));

  // a miss always finds a way of its own partition to replace
  a_mask: assert property (@(posedge clk) disable iff (!rst_n)
    st_q == S_LOOKUP && !l_hit |-> l_mask != '0);

endmodule
