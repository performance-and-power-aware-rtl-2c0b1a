// wac_pkg: types and constants shared by the way-adaptable, way-partitioned
// shared L2 cache and its control circuit.
//
// resize_e carries both the per-interval resize request of the local
// assessment (inc / keep / dec) and the command the global state machine
// issues (INC / KEEP / DEC); the two use the same three values.
// move_e is the way-allocation decision: which core gains one way from the
// other. NUM_CORES is two because the allocation rule compares exactly two
// cores' cache requirements.
package wac_pkg;

  localparam int unsigned NUM_CORES = 2;

  typedef enum logic [1:0] {
    RS_KEEP = 2'd0,
    RS_INC  = 2'd1,
    RS_DEC  = 2'd2
  } resize_e;

  typedef enum logic [1:0] {
    MV_NONE  = 2'd0,
    MV_TO_C0 = 2'd1,   // core 0 gains a way, core 1 loses one
    MV_TO_C1 = 2'd2    // core 1 gains a way, core 0 loses one
  } move_e;

  // control-event pulses brought out of the top for observation
  typedef struct packed {
    logic way_move;       // a way changed owner
    logic way_move_skip;  // an allocation move was not carried out
    logic way_on;         // ways were powered up
    logic way_off;        // a way was flushed and powered down
  } wac_events_t;

endpackage
