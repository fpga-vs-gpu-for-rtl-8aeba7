// tb_spmv_workload: runs the engine, at its default parameters, on random
// sparse matrices with the order and non-zero count of the evaluation matrices
// (from 8192 rows with about 41,000 non-zeros to 16,146 rows with about a
// million). Only the sizes are taken from those matrices; the column pattern
// and values are random. For each matrix it loads x, streams the scheduled
// packets back to back, and checks every row of y, that each row is reported
// once, and that the engine sustains one packet per cycle: the last result
// must arrive no later than a fixed drain time after the last packet. It prints
// the slot utilisation (non-zeros divided by slots streamed).
module tb_spmv_workload;
  import tb_spmv_pkg::*;
  import spmv_pkg::*;

  localparam int DRAIN = 40;

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
  int cyc = 0, last_result = 0;

  spmv_top dut (.clk, .rst, .start, .vec_we, .vec_addr, .vec_wdata, .pkt_valid, .pkt_data,
                .y_valid, .y_row, .y_val);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  spmv_sched sch;
  bit seen [int];
  int n_bad = 0;

  always @(negedge clk) begin
    if (!rst) for (int l = 0; l < 5; l++) if (y_valid[l]) begin
      int r;
      real got;
      r = int'(y_row[l]);
      got = $bitstoreal(y_val[l]);
      last_result = cyc;
      if (r >= sch.nrows || seen.exists(r)
          || fabs(got - sch.y_exp[r]) > sch.y_mag[r] * pow2(-44) + 1.0e-300) begin
        n_bad++;
        if (n_bad < 10) $display("row %0d: got %g expected %g", r, got,
                                 (r < sch.nrows) ? sch.y_exp[r] : 0.0);
      end
      seen[r] = 1;
    end
  end

  task automatic run(string name, int nrows, int ncols, int nnz_min, int nnz_max);
    int first, last_pkt, nz;
    sch.make_matrix(nrows, ncols, nnz_min, nnz_max);
    sch.schedule();
    seen.delete(); n_bad = 0;
    for (int c = 0; c < ncols; c++) begin
      @(negedge clk);
      vec_we = 1; vec_addr = 16'(c); vec_wdata = sch.x[c];
    end
    @(negedge clk); vec_we = 0; start = 1;
    @(negedge clk); start = 0;
    first = cyc;
    for (int i = 0; i < sch.npkts(); i++) begin
      @(negedge clk);
      pkt_valid = 1; pkt_data = sch.pkt5(i);
    end
    last_pkt = cyc;
    @(negedge clk); pkt_valid = 0;
    repeat (DRAIN + 10) @(negedge clk);
    nz = sch.cols.size();
    checks++;
    if (n_bad != 0 || seen.num() != nrows) begin
      failures++;
      $display("%s: %0d wrong rows, %0d of %0d reported", name, n_bad, seen.num(), nrows);
    end
    checks++;
    if (last_result - last_pkt > DRAIN || last_pkt - first != sch.npkts()) begin
      failures++;
      $display("%s: rate not sustained", name);
    end
    $display("%s: %0d rows, %0d non-zeros, %0d packets, utilisation %0.3f, %0d cycles",
             name, nrows, nz, sch.npkts(), real'(nz) / (5.0 * sch.npkts()),
             last_result - first);
  endtask

  initial begin
    sch = new();
    repeat (3) @(posedge clk);
    rst = 0;
    // Order and non-zeros per row (uniform, mean close to n_z / rows) of the
    // nine evaluation matrices.
    run("TSOPF_RS_b162_c3-sized", 15374, 15374, 20, 59);
    run("E40r1000-sized",         17281, 17281, 16, 48);
    run("olafu-sized",            16146, 16146, 32, 94);
    run("garon2-sized",           13535, 13535, 14, 41);
    run("lhr11c-sized",           10964, 10964, 11, 32);
    run("mark3jac020sc-sized",     9129,  9129,  3,  9);
    run("dw8192-sized",            8192,  8192,  2,  8);
    run("pssel-sized",            14318, 11028,  2,  6);
    run("ncvxqp1-sized",          12111, 12111,  3,  9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
