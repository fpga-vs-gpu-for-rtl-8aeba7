// tb_row_tracker: drives a lane's slot stream of values, padding, zero
// terminations, empty cycles, a termination to the idle row and a restart, and
// checks the row tag of every slot against the row sequence written down in the
// stimulus.
module tb_row_tracker;
  import spmv_pkg::*;

  logic clk = 0, rst = 1, start = 0, in_valid = 0;
  slot_t in_slot;
  logic [63:0] out_val;
  logic [15:0] out_col, out_row;
  logic out_term;
  int checks = 0, failures = 0;

  row_tracker #(.LANE_ID(16'd3)) dut (.clk, .rst, .start, .in_valid, .in_slot,
    .out_val, .out_col, .out_row, .out_term);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One slot: valid, value, column, expected row tag, expected termination flag.
  task automatic put(bit v, logic [63:0] val, logic [15:0] col, logic [15:0] row, bit term);
    @(negedge clk);
    in_valid = v; in_slot.val = val; in_slot.col = col;
    #1;
    checks++;
    if (out_row !== row || out_term !== term || out_val !== (v ? val : 64'd0)
        || out_col !== (v ? col : 16'd0)) begin
      failures++;
      $display("slot %h/%h: row %0d term %0b, expected row %0d term %0b",
               val, col, out_row, out_term, row, term);
    end
  endtask

  initial begin
    in_slot = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    // Row 3: six values, one pad, termination to row 9.
    for (int i = 0; i < 6; i++) put(1, 64'h3FF0_0000_0000_0000 + 64'(i), 16'(i + 1), 16'd3, 0);
    put(1, 64'd0, 16'd0, 16'd3, 0);
    put(1, 64'd0, 16'd9, 16'd3, 1);
    // Row 9 with an empty cycle and a negative zero pad.
    put(1, 64'h4000_0000_0000_0000, 16'd0, 16'd9, 0);   // value at column 0 is data
    put(0, 64'h1234, 16'd55, 16'd9, 0);
    put(1, {1'b1, 63'd0}, 16'd0, 16'd9, 0);
    put(1, {1'b1, 63'd0}, 16'd12, 16'd9, 1);            // -0.0 also terminates
    put(1, 64'hBFF0_0000_0000_0000, 16'd4, 16'd12, 0);
    put(1, 64'd0, 16'hFFFF, 16'd12, 1);
    put(1, 64'd0, 16'd0, 16'hFFFF, 0);
    put(0, 64'd0, 16'd0, 16'hFFFF, 0);
    // Restart puts the lane back on its first row.
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    put(1, 64'h3FF0_0000_0000_0000, 16'd2, 16'd3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
