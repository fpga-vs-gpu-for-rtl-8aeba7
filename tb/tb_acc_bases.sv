// tb_acc_bases: the accumulator built for base 32 and base 128 (LG_BASE 5 and
// 7, the ends of the selected base range; the default of 64 is covered by
// tb_fp_accumulator). Both copies receive the same back-to-back sets of random
// doubles (sizes 8 to 30) and must each report every set once, in order, with
// its tag, 14 cycles after the next set starts, within 2^-45 of the sum of
// magnitudes of the real sum.
module tb_acc_bases;
  import tb_spmv_pkg::*;

  localparam int LAT = 14;
  localparam int NSETS = 200;
  logic clk = 0, rst = 1;
  logic [63:0] in_val;
  logic [15:0] in_tag;
  logic [1:0] out_valid;
  logic [1:0][63:0] out_val;
  logic [1:0][15:0] out_tag;
  int checks = 0, failures = 0, cyc = 0;

  fp_accumulator #(.LG_BASE(5)) dut32  (.clk, .rst, .in_val, .in_tag,
    .out_valid(out_valid[0]), .out_val(out_val[0]), .out_tag(out_tag[0]));
  fp_accumulator #(.LG_BASE(7)) dut128 (.clk, .rst, .in_val, .in_tag,
    .out_valid(out_valid[1]), .out_val(out_val[1]), .out_tag(out_tag[1]));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real e_sum [NSETS];
  real e_mag [NSETS];
  int  e_due [NSETS];
  int  next [2] = '{0, 0};

  always @(negedge clk) begin
    if (!rst) for (int d = 0; d < 2; d++) if (out_valid[d]) begin
      int s;
      real got;
      s = next[d];
      next[d]++;
      got = $bitstoreal(out_val[d]);
      checks++;
      if (s >= NSETS || int'(out_tag[d]) != s || cyc != e_due[s]
          || fabs(got - e_sum[s]) > e_mag[s] * pow2(-45) + 1.0e-300) begin
        failures++;
        if (failures < 10) $display("base %0d set %0d: tag %0d got %g expected %g",
                                    d ? 128 : 32, s, out_tag[d], got, e_sum[s]);
      end
    end
  end

  initial begin
    in_val = '0; in_tag = '1;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int s = 0; s < NSETS; s++) begin
      int n;
      n = (s % 3 == 0) ? 8 : int'($urandom_range(8, 30));
      e_sum[s] = 0.0; e_mag[s] = 0.0;
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        if (k == 0 && s > 0) e_due[s-1] = cyc + LAT;
        in_val = rand_double(-30, 30);
        in_tag = 16'(s);
        e_sum[s] += $bitstoreal(in_val);
        e_mag[s] += fabs($bitstoreal(in_val));
      end
    end
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      if (k == 0) e_due[NSETS-1] = cyc + LAT;
      in_val = '0; in_tag = '1;
    end
    checks++;
    if (next[0] != NSETS || next[1] != NSETS) begin
      failures++;
      $display("sums reported: %0d and %0d of %0d", next[0], next[1], NSETS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
