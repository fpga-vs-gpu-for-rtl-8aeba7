// row_tracker: keeps track of the matrix row a dot-product lane is computing.
//
// The host schedules all values of one row into the same slot of consecutive
// packets. A slot whose value is zero and whose column field is non-zero is a
// zero termination: it still belongs to the current row (it adds 0.0 to it),
// and its column field names the row the lane works on next. A zero value with
// column 0 is padding and also belongs to the current row. Each lane starts on
// the row equal to its lane number, as in the document (rows 0 to 4 for five
// lanes); start re-arms that for a new matrix.
//
// This design's own choices: a cycle without a valid packet is treated as a
// padding slot, which only adds 0.0 to the current row; a termination that names
// ROW_IDLE parks the lane, and the values that follow are tagged ROW_IDLE and
// never reported. Both -0.0 and +0.0 count as zero.
//
// Interface: the row tag, value and column outputs are combinational from the
// inputs and the current-row register; the register changes on the clock edge
// after a termination.
module row_tracker
  import spmv_pkg::*;
#(
  parameter logic [COL_W-1:0] LANE_ID = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic             in_valid,
  input  slot_t            in_slot,
  output logic [VAL_W-1:0] out_val,
  output logic [COL_W-1:0] out_col,
  output logic [COL_W-1:0] out_row,
  output logic             out_term   // this slot terminates the current row
);

  logic [COL_W-1:0] cur_row;
  logic             is_zero;

  always_comb begin
    is_zero  = (in_slot.val[VAL_W-2:0] == '0);
    out_term = in_valid && is_zero && (in_slot.col != '0);
    out_row  = cur_row;
    out_val  = in_valid ? in_slot.val : '0;
    out_col  = in_valid ? in_slot.col : '0;
  end

  always_ff @(posedge clk) begin
    if (rst || start) cur_row <= LANE_ID;
    else if (out_term) cur_row <= in_slot.col;
  end

endmodule
