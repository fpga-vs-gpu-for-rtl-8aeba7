// tb_fp64_mul: checks the double-precision multiplier against the simulator's
// own real multiplication (round to nearest even), one product per cycle, with
// a two-cycle latency. Covers random signs, exponent spreads, zero operands and
// products that need the one-bit normalization and those that do not.
module tb_fp64_mul;
  import tb_spmv_pkg::*;

  logic clk = 0, rst = 1;
  logic [63:0] a, b, p;
  int checks = 0, failures = 0;
  int n_hi = 0, n_zero = 0;

  fp64_mul dut (.clk, .rst, .a, .b, .p);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] exp_q [$];

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] ea;
      @(negedge clk);
      a = rand_double(-300, 300);
      b = rand_double(-300, 300);
      if (i % 97 == 0) begin a = '0; n_zero++; end
      if (i % 89 == 0) begin b = {1'b1, 63'd0}; n_zero++; end
      if (a[62:0] == 0 || b[62:0] == 0) ea = {a[63] ^ b[63], 63'd0};
      else ea = $realtobits($bitstoreal(a) * $bitstoreal(b));
      if (((106'({1'b1, a[51:0]}) * 106'({1'b1, b[51:0]})) >> 105) != 0) n_hi++;
      exp_q.push_back(ea);
      if (exp_q.size() > 2) begin
        logic [63:0] e;
        e = exp_q.pop_front();
        checks++;
        if (p !== e) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h expected %h", p, e);
        end
      end
    end
    if (n_hi == 0 || n_zero == 0) begin failures++; $display("coverage hole"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
