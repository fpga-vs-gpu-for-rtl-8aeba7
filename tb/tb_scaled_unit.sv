// tb_scaled_unit: testbench building block (not a test on its own). It holds one
// spmv_top with NL lanes and runs one random matrix of NROWS x NCOLS, with
// NNZ_MIN to NNZ_MAX non-zeros per row, through it: it loads x, streams the
// scheduled packets back to back, checks every row of y against the real
// result and that one packet is consumed per cycle, then raises done.
module tb_scaled_unit #(
  parameter int    NL      = 15,
  parameter int    NROWS   = 1000,
  parameter int    NCOLS   = 1000,
  parameter int    NNZ_MIN = 2,
  parameter int    NNZ_MAX = 8,
  parameter string NAME    = "matrix"
) (
  output int checks,
  output int failures,
  output bit done
);
  import tb_spmv_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic vec_we = 0;
  logic [15:0] vec_addr = '0;
  logic [63:0] vec_wdata = '0;
  logic pkt_valid = 0;
  logic [NL*80-1:0] pkt_data = '0;
  logic [NL-1:0] y_valid;
  logic [NL-1:0][15:0] y_row;
  logic [NL-1:0][63:0] y_val;
  int cyc = 0, last_result = 0, n_bad = 0;

  spmv_top #(.N_LANES(NL)) dut (.clk, .rst, .start, .vec_we, .vec_addr, .vec_wdata,
    .pkt_valid, .pkt_data, .y_valid, .y_row, .y_val);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  spmv_sched sch;
  bit seen [int];

  always @(negedge clk) begin
    if (!rst) for (int l = 0; l < NL; l++) if (y_valid[l]) begin
      int r;
      real got;
      r = int'(y_row[l]);
      got = $bitstoreal(y_val[l]);
      last_result = cyc;
      if (r >= sch.nrows || seen.exists(r)
          || fabs(got - sch.y_exp[r]) > sch.y_mag[r] * pow2(-44) + 1.0e-300) begin
        n_bad++;
        if (n_bad < 5) $display("%s row %0d: got %g expected %g", NAME, r, got,
                                (r < sch.nrows) ? sch.y_exp[r] : 0.0);
      end
      seen[r] = 1;
    end
  end

  initial begin
    int first, last_pkt, nz;
    checks = 0; failures = 0; done = 0;
    sch = new();
    sch.nlanes = NL;
    sch.make_matrix(NROWS, NCOLS, NNZ_MIN, NNZ_MAX);
    sch.schedule();
    repeat (3) @(posedge clk);
    rst = 0;
    for (int c = 0; c < NCOLS; c++) begin
      @(negedge clk);
      vec_we = 1; vec_addr = 16'(c); vec_wdata = sch.x[c];
    end
    @(negedge clk); vec_we = 0; start = 1;
    @(negedge clk); start = 0;
    first = cyc;
    for (int i = 0; i < sch.npkts(); i++) begin
      @(negedge clk);
      pkt_valid = 1;
      for (int l = 0; l < NL; l++) pkt_data[NL*80-1 - 80*l -: 80] = sch.slot(i, l);
    end
    last_pkt = cyc;
    @(negedge clk); pkt_valid = 0;
    repeat (50) @(negedge clk);
    nz = sch.cols.size();
    checks += 2;
    if (n_bad != 0 || seen.num() != NROWS) begin
      failures++;
      $display("%s: %0d wrong rows, %0d of %0d reported", NAME, n_bad, seen.num(), NROWS);
    end
    if (last_result - last_pkt > 40 || last_pkt - first != sch.npkts()) begin
      failures++;
      $display("%s: rate not sustained", NAME);
    end
    $display("%s on %0d lanes: %0d non-zeros, %0d packets, utilisation %0.3f",
             NAME, NL, nz, sch.npkts(), real'(nz) / real'(NL * sch.npkts()));
    done = 1;
  end
endmodule
