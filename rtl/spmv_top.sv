// spmv_top: sparse matrix-vector multiply engine, y = A x, for a matrix streamed
// from off-chip memory in a pre-scheduled packet format.
//
// Each cycle one packet of N_LANES slots arrives; slot i feeds dot-product lane
// i.
// Every lane keeps its own copy of x, a multiplier and an accumulator, and
// computes whole rows on its own: the host schedules all non-zeros of a row into
// one slot position, ends the row with a zero termination whose column field
// names the lane's next row, pads rows shorter than the accumulator's minimum
// set size of eight with zeros (value 0.0, column 0), and pads lanes that have
// run out of rows. The lanes start on rows 0 to N_LANES-1. The five lanes, the
// 400-bit packet and the data format follow the document. Because the lanes are
// independent, more memory bandwidth is used by raising N_LANES (the packet
// grows by 80 bits per lane), as the document suggests for wider boards.
//
// This design's choices: slot 0 occupies the most significant 80 bits of the
// packet and, within a slot, the value sits above the 16-bit column; a cycle
// without pkt_valid is padding for every lane (so the memory may deliver
// packets with gaps); a termination naming row 16'hFFFF parks a lane for the
// rest of the matrix; the results leave on one port per lane, as the lanes
// produce them, with no merging.
//
// Interface: load x through vec_we/vec_addr/vec_wdata (written to all lane
// copies at once), pulse start, then stream packets. After the last packet,
// keep the clock running (pkt_valid low) for about 25 cycles so the final rows
// drain. y_valid[i] pulses with y_row[i] and y_val[i] for each finished row of
// lane i.
module spmv_top
  import spmv_pkg::*;
#(
  parameter int unsigned N_LANES = spmv_pkg::LANES,
  parameter int unsigned LG_BASE = spmv_pkg::ACC_LG_BASE,
  localparam int unsigned PKT_W  = N_LANES * SLOT_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       start,
  input  logic                       vec_we,
  input  logic [COL_W-1:0]           vec_addr,
  input  logic [VAL_W-1:0]           vec_wdata,
  input  logic                       pkt_valid,
  input  logic [PKT_W-1:0]             pkt_data,
  output logic [N_LANES-1:0]            y_valid,
  output logic [N_LANES-1:0][COL_W-1:0] y_row,
  output logic [N_LANES-1:0][VAL_W-1:0] y_val
);

  for (genvar i = 0; i < int'(N_LANES); i++) begin : g_lane
    slot_t slot;
    assign slot = slot_t'(pkt_data[PKT_W-1-i*SLOT_W -: SLOT_W]);

    dot_product_lane #(.LANE_ID(COL_W'(i)), .LG_BASE(LG_BASE)) u_lane (
      .clk, .rst, .start,
      .vec_we, .vec_addr, .vec_wdata,
      .in_valid(pkt_valid), .in_slot(slot),
      .y_valid(y_valid[i]), .y_row(y_row[i]), .y_val(y_val[i])
    );
  end

endmodule
