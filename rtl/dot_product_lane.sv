// dot_product_lane: one of the parallel dot-product modules of the SpMV engine.
//
// A lane receives one matrix slot (value, column) per cycle. The row tracker
// tags the slot with the row the lane is working on and follows the zero
// terminations that move the lane to its next row. The column index reads the
// lane's own copy of x from block RAM while the value waits one cycle in a
// register; the multiplier forms value * x[col]; the accumulator sums the
// products of each row and reports y[row] with its row number. Because every
// row stays in one lane, the lanes work independently. This organisation is the
// document's; the tag path and the use of an idle row are this design's.
//
// Interface: vec_we/vec_addr/vec_wdata load x before a matrix is streamed.
// in_valid/in_slot carry one slot per cycle; a cycle without in_valid counts as
// padding. start puts the lane back on its first row (row LANE_ID). y_valid
// pulses once per finished row with y_row and y_val. Latency from a row's last
// slot to its result: 1 (BRAM) + 2 (multiplier) + the accumulator's.
module dot_product_lane
  import spmv_pkg::*;
#(
  parameter logic [COL_W-1:0] LANE_ID = '0,
  parameter int unsigned      LG_BASE = spmv_pkg::ACC_LG_BASE
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic             vec_we,
  input  logic [COL_W-1:0] vec_addr,
  input  logic [VAL_W-1:0] vec_wdata,
  input  logic             in_valid,
  input  slot_t            in_slot,
  output logic             y_valid,
  output logic [COL_W-1:0] y_row,
  output logic [VAL_W-1:0] y_val
);

  localparam int unsigned MUL_LAT = 2;

  logic [VAL_W-1:0] rt_val;
  logic [COL_W-1:0] rt_col, rt_row;

  row_tracker #(.LANE_ID(LANE_ID)) u_rows (
    .clk, .rst, .start, .in_valid, .in_slot,
    .out_val(rt_val), .out_col(rt_col), .out_row(rt_row), .out_term()
  );

  // Vector copy and value register (aligned to the BRAM read).
  logic [VAL_W-1:0] x_val, val_q;
  logic [COL_W-1:0] row_q;

  vector_bram #(.ADDR_W(COL_W), .DATA_W(VAL_W)) u_vec (
    .clk, .we(vec_we), .waddr(vec_addr), .wdata(vec_wdata),
    .raddr(rt_col), .rdata(x_val)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      val_q <= '0;
      row_q <= ROW_IDLE;
    end else begin
      val_q <= rt_val;
      row_q <= rt_row;
    end
  end

  // Multiplier, with the row tag delayed alongside.
  logic [VAL_W-1:0] prod;
  logic [COL_W-1:0] row_d [MUL_LAT];

  fp64_mul u_mul (.clk, .rst, .a(val_q), .b(x_val), .p(prod));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(MUL_LAT); i++) row_d[i] <= ROW_IDLE;
    end else begin
      row_d[0] <= row_q;
      for (int i = 1; i < int'(MUL_LAT); i++) row_d[i] <= row_d[i-1];
    end
  end

  fp_accumulator #(.LG_BASE(LG_BASE), .TAG_W(COL_W)) u_acc (
    .clk, .rst,
    .in_val(prod), .in_tag(row_d[MUL_LAT-1]),
    .out_valid(y_valid), .out_val(y_val), .out_tag(y_row)
  );

endmodule
