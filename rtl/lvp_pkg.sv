// lvp_pkg: types and constants shared by the coalesced-hybrid load value
// predictor (St+Reg+L3pV).
//
// The predictor is built for a 64-bit machine (full load values are 64 bits
// wide, program counters are 64-bit byte addresses of 4-byte instructions).
// The component numbering fixes the tie-break order of the selector: a lower
// number wins a tie.  Stride first, register second, then the last value and
// the partial values from youngest to oldest, as the design prescribes.
package lvp_pkg;

  localparam int unsigned PC_W  = 64;  // program counter width
  localparam int unsigned VAL_W = 64;  // load value width

  // Component slots of the hybrid.  Slots from COMP_PV0 upward hold the
  // second, third, ... last (partial) values.
  typedef enum logic [2:0] {
    COMP_ST  = 3'd0,   // storage-less stride
    COMP_REG = 3'd1,   // storage-less register value
    COMP_LV  = 3'd2,   // last (full 64-bit) value
    COMP_PV0 = 3'd3    // first partial value (second last value)
  } comp_e;

  // One prediction request: the load's PC and the value currently held in
  // the load's destination register (the register component's prediction).
  typedef struct packed {
    logic [PC_W-1:0]  pc;
    logic [VAL_W-1:0] reg_val;
  } pred_req_t;

  // One update: the load's PC, the value it really fetched, and the value
  // its destination register held when the load was predicted.
  typedef struct packed {
    logic [PC_W-1:0]  pc;
    logic [VAL_W-1:0] value;
    logic [VAL_W-1:0] reg_val;
  } upd_req_t;

  // Per-bank event pulses, for performance counting.
  typedef struct packed {
    logic upd_done;     // an update left the pipeline
    logic upd_hit;      // ... and its b-tag matched
    logic upd_first_miss; // ... it missed once: only the miss bit was set
    logic upd_replace;  // ... it missed twice in a row: the line was taken over
    logic pred_done;    // a prediction result was produced
    logic pred_taken;   // ... and a value was predicted
  } bank_evt_t;

endpackage
