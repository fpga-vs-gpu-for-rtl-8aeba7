// spmv_pkg: types and constants shared by the SpMV datapath.
//
// The matrix is streamed as 400-bit packets of five 80-bit slots, one slot per
// dot-product lane. A slot holds a 64-bit IEEE 754 double-precision matrix value
// and a 16-bit column index (the packet width, slot count and 16-bit column
// index follow the document's memory format). The accumulator works in base
// 2^ACC_LG_BASE digits; its default of ACC_LG_BASE = 6 (base 64) lies in the range of
// bases the document selects (32 to 128). ROW_IDLE is this design's own choice:
// a row number no matrix can use, which marks a lane that has no row to work on.
package spmv_pkg;

  localparam int unsigned LANES    = 5;
  localparam int unsigned VAL_W    = 64;
  localparam int unsigned COL_W    = 16;
  localparam int unsigned SLOT_W   = VAL_W + COL_W;   // 80

  // Accumulator defaults.
  localparam int unsigned ACC_LG_BASE = 6;              // base b = 64
  localparam int unsigned ACC_ALPHA = 3;              // de-normalize/add latency
  localparam int unsigned MIN_SET  = 8;               // minimum set size for ALPHA = 3

  localparam logic [COL_W-1:0] ROW_IDLE = '1;

  typedef struct packed {
    logic [VAL_W-1:0] val;
    logic [COL_W-1:0] col;
  } slot_t;

  // Routing configurations of the reduction circuit.
  typedef enum logic [1:0] {
    CFG_A = 2'd0,   // in -> input buffer; output buffer + pipeline output -> pipeline
    CFG_B = 2'd1,   // incoming value + pipeline output -> pipeline (steady state)
    CFG_C = 2'd2,   // incoming value + input buffer -> pipeline; pipeline output -> output buffer
    CFG_D = 2'd3    // incoming value + 0 -> pipeline; pipeline output -> output buffer
  } red_cfg_e;

endpackage
