// tb_dot_product_lane: one lane computing its share of a random sparse matrix.
// The host model schedules the matrix for five lanes; this lane receives slot 0
// of every packet, with random empty cycles. Each reported row must be one of
// the rows scheduled into slot 0, reported once, and match the real dot product
// to within 2^-44 of the sum of product magnitudes.
module tb_dot_product_lane;
  import tb_spmv_pkg::*;
  import spmv_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic vec_we = 0;
  logic [15:0] vec_addr = '0;
  logic [63:0] vec_wdata = '0;
  logic in_valid = 0;
  slot_t in_slot;
  logic y_valid;
  logic [15:0] y_row;
  logic [63:0] y_val;
  int checks = 0, failures = 0;

  dot_product_lane #(.LANE_ID(16'd0)) dut (.clk, .rst, .start, .vec_we, .vec_addr, .vec_wdata,
    .in_valid, .in_slot, .y_valid, .y_row, .y_val);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  spmv_sched sch;
  bit mine [int];
  bit seen [int];

  always @(negedge clk) begin
    if (!rst && y_valid) begin
      real got;
      int r;
      r = int'(y_row);
      got = $bitstoreal(y_val);
      checks++;
      if (!mine.exists(r) || seen.exists(r)
          || fabs(got - sch.y_exp[r]) > sch.y_mag[r] * pow2(-44) + 1.0e-300) begin
        failures++;
        if (failures < 10) $display("row %0d: got %g expected %g", r, got, sch.y_exp[r]);
      end
      seen[r] = 1;
    end
  end

  initial begin
    int row;
    in_slot = '0;
    sch = new();
    sch.make_matrix(60, 48, 0, 20);
    sch.schedule();
    // Rows that slot 0 carries.
    row = 0;
    for (int i = 0; i < sch.npkts(); i++) begin
      logic [79:0] s;
      s = sch.slot(i, 0);
      if (row != int'(IDLE)) mine[row] = 1;
      if (s[78:16] == '0 && s[15:0] != '0) row = int'(s[15:0]);
    end
    repeat (3) @(posedge clk);
    rst = 0;
    for (int c = 0; c < sch.ncols; c++) begin
      @(negedge clk);
      vec_we = 1; vec_addr = 16'(c); vec_wdata = sch.x[c];
    end
    @(negedge clk); vec_we = 0; start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < sch.npkts(); i++) begin
      while ($urandom_range(0, 4) == 0) begin
        @(negedge clk); in_valid = 0; in_slot = slot_t'(80'h1);
      end
      @(negedge clk);
      in_valid = 1;
      in_slot = slot_t'(sch.slot(i, 0));
    end
    @(negedge clk); in_valid = 0;
    repeat (60) @(negedge clk);
    checks++;
    if (seen.num() != mine.num() || mine.num() < 5) begin
      failures++;
      $display("rows reported %0d of %0d", seen.num(), mine.num());
    end
    $display("lane 0 rows: %0d", mine.num());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
