// tb_spmv_top: end-to-end test of the five-lane SpMV engine at its default
// parameters. A host model builds a random sparse matrix (rows with 0 to 24
// non-zeros, so both padded short rows and long rows occur), schedules it into
// 400-bit packets and streams them with random empty cycles after loading x
// into all vector copies. Every row of y must be reported exactly once and
// match the real-arithmetic result to within 2^-44 of the sum of product
// magnitudes. The matrix is run twice (the second time after a restart and
// with a new x) to exercise start. The test counts each mechanism of the
// design and fails if one never happened: zero terminations, zero padding,
// idle lanes at the end, empty cycles, the four reduction configurations,
// carry shifts in the adder, negative results, and results from every lane.
module tb_spmv_top;
  import tb_spmv_pkg::*;
  import spmv_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic vec_we = 0;
  logic [15:0] vec_addr = '0;
  logic [63:0] vec_wdata = '0;
  logic pkt_valid = 0;
  logic [399:0] pkt_data = '0;
  logic [4:0] y_valid;
  logic [4:0][15:0] y_row;
  logic [4:0][63:0] y_val;
  int checks = 0, failures = 0;

  spmv_top dut (.clk, .rst, .start, .vec_we, .vec_addr, .vec_wdata, .pkt_valid, .pkt_data,
                .y_valid, .y_row, .y_val);

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_cfg [4];
  int n_carry = 0, n_neg = 0, n_bubble = 0, n_pads = 0, n_terms = 0, n_idle = 0;
  int n_short = 0, n_long = 0;
  int n_lane [5];

  always @(posedge clk) if (!rst) begin
    n_cfg[dut.g_lane[0].u_lane.u_acc.cfg]++;
    n_cfg[dut.g_lane[1].u_lane.u_acc.cfg]++;
    n_cfg[dut.g_lane[2].u_lane.u_acc.cfg]++;
    n_cfg[dut.g_lane[3].u_lane.u_acc.cfg]++;
    n_cfg[dut.g_lane[4].u_lane.u_acc.cfg]++;
    if (dut.g_lane[0].u_lane.u_acc.u_add.carry) n_carry++;
    if (dut.g_lane[3].u_lane.u_acc.u_add.carry) n_carry++;
  end

  spmv_sched sch;
  bit seen [int];

  always @(negedge clk) begin
    if (!rst) for (int l = 0; l < 5; l++) if (y_valid[l]) begin
      real got;
      int r;
      r = int'(y_row[l]);
      got = $bitstoreal(y_val[l]);
      checks++;
      n_lane[l]++;
      if (got < 0.0) n_neg++;
      if (r >= sch.nrows || seen.exists(r)
          || fabs(got - sch.y_exp[r]) > sch.y_mag[r] * pow2(-44) + 1.0e-300) begin
        failures++;
        if (failures < 10) $display("lane %0d row %0d: got %g expected %g", l, r, got,
                                    (r < sch.nrows) ? sch.y_exp[r] : 0.0);
      end
      seen[r] = 1;
    end
  end

  task automatic run_matrix(int nrows, int ncols);
    sch.make_matrix(nrows, ncols, 0, 24);
    sch.schedule();
    n_pads += sch.n_pads; n_terms += sch.n_terms; n_idle += sch.n_idle;
    n_short += sch.n_short; n_long += sch.n_long;
    seen.delete();
    for (int c = 0; c < ncols; c++) begin
      @(negedge clk);
      vec_we = 1; vec_addr = 16'(c); vec_wdata = sch.x[c];
    end
    @(negedge clk); vec_we = 0; start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < sch.npkts(); i++) begin
      while ($urandom_range(0, 5) == 0) begin
        @(negedge clk); pkt_valid = 0; pkt_data = {13{$urandom}}; n_bubble++;
      end
      @(negedge clk);
      pkt_valid = 1; pkt_data = sch.pkt5(i);
    end
    @(negedge clk); pkt_valid = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (seen.num() != nrows) begin
      failures++;
      $display("rows reported %0d of %0d", seen.num(), nrows);
    end
    $display("matrix %0d x %0d: %0d packets", nrows, ncols, sch.npkts());
  endtask

  initial begin
    sch = new();
    repeat (3) @(posedge clk);
    rst = 0;
    run_matrix(150, 200);
    run_matrix(97, 64);
    $display("configs A %0d B %0d C %0d D %0d, carries %0d, negative %0d, empty cycles %0d",
             n_cfg[0], n_cfg[1], n_cfg[2], n_cfg[3], n_carry, n_neg, n_bubble);
    $display("terminations %0d, pads %0d, idle slots %0d, short rows %0d, long rows %0d",
             n_terms, n_pads, n_idle, n_short, n_long);
    foreach (n_cfg[i]) if (n_cfg[i] == 0) begin failures++; $display("configuration %0d never used", i); end
    foreach (n_lane[i]) if (n_lane[i] == 0) begin failures++; $display("lane %0d idle", i); end
    if (n_carry == 0 || n_neg == 0 || n_bubble == 0 || n_pads == 0 || n_terms == 0
        || n_idle == 0 || n_short == 0 || n_long == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
