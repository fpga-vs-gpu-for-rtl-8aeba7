// reduction_ctrl: the 9-state controller of the accumulator's reduction circuit
// for a de-normalize/add pipeline of depth 3.
//
// In steady state (configuration B) each incoming value is added to the partial
// sum leaving the pipeline, so the pipeline circulates three partial sums of
// the current set. When the next value belongs to a new set, the controller
// steps unconditionally through D, A, C, B, A, B, B, C: over these eight cycles
// the three old partial sums are folded into one (two A configurations, each
// using the output buffer) while the new set's values are taken in (buffered
// once per A and consumed again by the following C). In the final C cycle the
// pipeline delivers the completed sum of the old set to the output buffer,
// signalled by final_sum. The state after that is B or, if yet another set
// starts, D. This sequence, the four configurations and the 9-state FSM with
// only the set-change condition follow the document; the state names are this
// design's.
//
// Interface: set_change_next is high when the value that enters next cycle
// belongs to a different set than the value entering now (the document compares
// the set numbers of two adjacent pipeline stages). cfg is the configuration
// for the value entering this cycle. A set shorter than the minimum of eight
// values violates an assertion; the hardware then simply continues the
// sequence.
module reduction_ctrl
  import spmv_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     set_change_next,
  output red_cfg_e cfg,
  output logic     final_sum,   // pipeline output is the finished sum of the previous set
  output logic     set_start    // the value entering now is the first of a new set
);

  typedef enum logic [3:0] {
    ST_B,   // steady state
    ST_D,   // first value of a new set
    ST_A1, ST_C1, ST_B1, ST_A2, ST_B2, ST_B3, ST_C2
  } state_e;

  state_e state, state_next;

  always_comb begin
    unique case (state)
      ST_B:    state_next = set_change_next ? ST_D : ST_B;
      ST_D:    state_next = ST_A1;
      ST_A1:   state_next = ST_C1;
      ST_C1:   state_next = ST_B1;
      ST_B1:   state_next = ST_A2;
      ST_A2:   state_next = ST_B2;
      ST_B2:   state_next = ST_B3;
      ST_B3:   state_next = ST_C2;
      ST_C2:   state_next = set_change_next ? ST_D : ST_B;
      default: state_next = ST_B;
    endcase
  end

  always_comb begin
    unique case (state)
      ST_D:                 cfg = CFG_D;
      ST_A1, ST_A2:         cfg = CFG_A;
      ST_C1, ST_C2:         cfg = CFG_C;
      default:              cfg = CFG_B;
    endcase
    final_sum = (state == ST_C2);
    set_start = (state == ST_D);
  end

  always_ff @(posedge clk) begin
    if (rst) state <= ST_B;
    else     state <= state_next;
  end

  // A new set may only start once the previous one has been reduced.
  a_min_set: assert property (@(posedge clk) disable iff (rst)
    set_change_next |-> (state == ST_B || state == ST_C2))
    else $error("reduction_ctrl: input set shorter than %0d values", MIN_SET);

endmodule
