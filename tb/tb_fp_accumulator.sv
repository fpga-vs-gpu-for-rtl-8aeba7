// tb_fp_accumulator: streams back-to-back sets of random doubles (sizes 8 to
// 40, mixed signs, exponents spread over +-20 binary orders, some sets exactly
// the minimum size of 8, some all-zero) with no gaps, then idle filler, and
// checks that each set yields exactly one sum, in order, with its tag, within
// 2^-45 of the sum of magnitudes of the exact real sum, and that each sum
// appears a fixed 14 cycles after the first value of the following set.
// It also checks that all four routing configurations occurred.
module tb_fp_accumulator;
  import tb_spmv_pkg::*;
  import spmv_pkg::*;

  localparam int LAT = 14;
  logic clk = 0, rst = 1;
  logic [63:0] in_val, out_val;
  logic [15:0] in_tag, out_tag;
  logic out_valid;
  int checks = 0, failures = 0;
  int cyc = 0;
  int cfg_cnt [4];

  fp_accumulator dut (.clk, .rst, .in_val, .in_tag, .out_valid, .out_val, .out_tag);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) cfg_cnt[dut.cfg]++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real  e_sum [$];
  real  e_mag [$];
  logic [15:0] e_tag [$];
  int   e_due [$];     // cycle at which the sum must appear
  int   n_sets = 0, n_got = 0;

  // Output checker.
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      real got, ex, mg;
      checks++;
      n_got++;
      if (e_sum.size() == 0) begin
        failures++;
        $display("unexpected sum for tag %0d", out_tag);
      end else begin
        ex = e_sum.pop_front(); mg = e_mag.pop_front();
        got = $bitstoreal(out_val);
        if (out_tag !== e_tag[0] || fabs(got - ex) > mg * pow2(-45) + 1.0e-300
            || cyc != e_due[0]) begin
          failures++;
          if (failures < 10)
            $display("tag %0d (exp %0d): got %g expected %g, cycle %0d due %0d",
                     out_tag, e_tag[0], got, ex, cyc, e_due[0]);
        end
        void'(e_tag.pop_front()); void'(e_due.pop_front());
      end
    end
  end

  initial begin
    in_val = '0; in_tag = '1;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int s = 0; s < 300; s++) begin
      int n;
      real sum, mag;
      n = (s % 4 == 0) ? 8 : int'($urandom_range(8, 40));
      sum = 0.0; mag = 0.0;
      for (int k = 0; k < n; k++) begin
        @(negedge clk);
        if (k == 0 && s > 0) e_due.push_back(cyc + LAT);
        in_val = (s % 25 == 3) ? 64'd0 : rand_double(-20, 20);
        in_tag = 16'(s);
        sum += $bitstoreal(in_val);
        mag += fabs($bitstoreal(in_val));
      end
      e_sum.push_back(sum); e_mag.push_back(mag); e_tag.push_back(16'(s));
      n_sets++;
    end
    // Idle filler flushes the last set.
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      if (k == 0) e_due.push_back(cyc + LAT);
      in_val = '0; in_tag = '1;
    end
    checks++;
    if (n_got != n_sets) begin
      failures++;
      $display("sets %0d, sums %0d", n_sets, n_got);
    end
    foreach (cfg_cnt[i]) if (cfg_cnt[i] == 0) begin failures++; $display("configuration %0d unused", i); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
